// dldo_top: digital controller of a coarse-fine-tuning (CFT) digital LDO with
// burst-mode transient enhancement and feed-forward limit-cycle reduction.
//
// The power stage is split into a coarse PMOS array (64 units, x16) and a
// fine one (32 units, x1), each driven by its own bidirectional shift
// register; the combined word is CMB = 16 * CRS + FINE, where CRS and FINE
// count the PMOS turned off. In steady state only the fine register runs, at
// the 50 MHz sampling rate. When the window detector sees an under- or
// overshoot, the control logic raises MOD for a 128-cycle burst in which the
// coarse register runs at 500 MHz and the fine word is frozen; a guard
// period follows. Regulation compensation steps the coarse register once
// when the fine word hits an end and re-centres the fine word, leaving CMB
// unchanged, so slow load drift is followed without a burst.
// The comparator output CMP_OUT also drives the x2 auxiliary PMOS
// directly (aux_off), bypassing the integrator: this adds a zero to the loop
// and pulls the steady-state limit cycle down to mode 1. All of this follows
// the reference design; the single-clock realisation (CLK_SLOW as an enable
// derived from CLK_FAST), the synchronisers, the reset words and the guard
// length are this design's choices.
//
// Analog parts stay outside: CMP1 (cmp_out), the window comparators CMP2 and
// CMP3 (cmp2_out, cmp3_out) and the PMOS arrays (crs, fine, aux_off; a 1
// turns a PMOS off). cmp_out is expected from a clocked comparator that
// decides on the cycles flagged by cmp_sample; a shift register uses the
// decision of the previous sampling instant (one-sample delay), while the
// aux gates follow cmp_out at once. aux_off and comp_up are therefore plain
// copies of cmp_out; that is the feed-forward path itself, not an oversight.
module dldo_top
  import dldo_pkg::*;
#(
  parameter int unsigned N_COARSE     = dldo_pkg::CFG_COARSE_UNITS,
  parameter int unsigned N_FINE       = dldo_pkg::CFG_FINE_UNITS,
  parameter int unsigned BETA         = dldo_pkg::CFG_AUX_BETA,
  parameter int unsigned SLOW_DIV     = dldo_pkg::CFG_SLOW_DIV,
  parameter int unsigned BURST_CYCLES = dldo_pkg::CFG_BURST_CYCLES,
  parameter int unsigned GUARD_CYCLES = dldo_pkg::CFG_GUARD_CYCLES
) (
  input  logic                clk_fast,    // CLK_FAST, 500 MHz
  input  logic                rst_n,       // asynchronous active-low reset
  input  logic                cmp_out,     // CMP1: V_OUT > V_REF
  input  logic                cmp2_out,    // CMP2: V_OUT < V_REF_H
  input  logic                cmp3_out,    // CMP3: V_OUT > V_REF_L
  output logic [N_COARSE-1:0] crs,         // coarse PMOS gates, 1 = off
  output logic [N_FINE-1:0]   fine,        // fine PMOS gates, 1 = off
  output logic [BETA-1:0]     aux_off,     // Aux PMOS gates, 1 = off
  output logic                mod,         // MOD: 1 = coarse tuning (burst)
  output logic                cmp_sample,  // CMP1 decides in this cycle
  output logic                guard,       // guard period after a burst
  output logic                comp,        // regulation compensation step
  output logic                comp_up      // its direction (1 = CRS + 1)
);

  logic out_of_range;
  logic coarse_en, fine_en;
  logic fine_full, fine_empty;
  logic coarse_up;

  peak_detector u_pd (
    .clk(clk_fast), .rst_n,
    .cmp2_out, .cmp3_out,
    .out_of_range, .overshoot(), .undershoot()
  );

  burst_ctrl #(.BURST_CYCLES(BURST_CYCLES), .GUARD_CYCLES(GUARD_CYCLES)) u_ctrl (
    .clk(clk_fast), .rst_n,
    .out_of_range, .mod, .guard, .burst_start(), .phase()
  );

  clk_gate_ctrl #(.SLOW_DIV(SLOW_DIV)) u_cg (
    .clk(clk_fast), .rst_n,
    .mod, .comp,
    .slow_tick(), .coarse_en, .fine_en, .sample_en(cmp_sample)
  );

  reg_comp u_rc (
    .fine_tick(fine_en), .cmp_out,
    .fine_full, .fine_empty,
    .comp, .up(comp_up)
  );

  // In a burst the coarse register follows the comparator; otherwise it only
  // moves on a compensation step, in the direction that step asks for.
  assign coarse_up = mod ? cmp_out : comp_up;

  bidir_sr #(.WIDTH(N_COARSE), .RESET_ONES(N_COARSE)) u_coarse (
    .clk(clk_fast), .rst_n,
    .load(1'b0), .en(coarse_en), .up(coarse_up),
    .q(crs), .full(), .empty()
  );

  // A compensation step re-centres the fine word (CMB unchanged).
  bidir_sr #(.WIDTH(N_FINE), .RESET_ONES(N_FINE / 2), .LOAD_ONES(N_FINE / 2)) u_fine (
    .clk(clk_fast), .rst_n,
    .load(comp), .en(fine_en), .up(cmp_out),
    .q(fine), .full(fine_full), .empty(fine_empty)
  );

  // LCO-reduction feed-forward path: CMP_OUT straight onto the Aux PMOS.
  assign aux_off = {BETA{cmp_out}};

  // The fine word is frozen during a burst.
  a_fine_hold: assert property (@(posedge clk_fast) disable iff (!rst_n)
                                mod |=> $stable(fine))
    else $error("dldo_top: fine word changed during a burst");

endmodule
