// burst_ctrl: control logic that produces the mode-select signal MOD.
//
// In steady state the regulator fine-tunes (MOD = 0). When the window
// detector reports V_OUT outside [V_REF_L, V_REF_H], MOD goes to 1 for a
// fixed burst of BURST_CYCLES fast clock cycles (dT1 = 128 cycles = 256 ns
// at 500 MHz, enough for a full-range change of the 64-unit coarse word),
// during which the coarse register runs at CLK_FAST and the fine word is
// held. After the burst a guard period of GUARD_CYCLES (dT2) follows in
// fine-tuning mode in which a new detection is ignored, so the regulator
// does not fall straight back into burst mode. Burst length and the guard
// follow the reference design; the guard length, and that a detection during
// the guard is dropped rather than remembered, are this design's choices.
//
// Timing: a detection sampled in cycle t makes MOD = 1 from cycle t+1 for
// exactly BURST_CYCLES cycles. MOD is a flop output (decoded from the phase
// register). burst_start is a one-cycle pulse in the first burst cycle.
module burst_ctrl
  import dldo_pkg::*;
#(
  parameter int unsigned BURST_CYCLES = dldo_pkg::CFG_BURST_CYCLES,
  parameter int unsigned GUARD_CYCLES = dldo_pkg::CFG_GUARD_CYCLES
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   out_of_range,  // from the peak detector
  output logic   mod,           // MOD: 1 = coarse tuning
  output logic   guard,         // in the guard period dT2
  output logic   burst_start,   // first cycle of a burst
  output phase_e phase
);

  localparam int unsigned MAXC = (BURST_CYCLES > GUARD_CYCLES) ? BURST_CYCLES : GUARD_CYCLES;
  localparam int unsigned CW   = (MAXC > 1) ? $clog2(MAXC) : 1;

  logic [CW-1:0] cnt;
  logic          first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_FINE;
      cnt   <= '0;
      first <= 1'b0;
    end else begin
      first <= 1'b0;
      unique case (phase)
        PH_FINE: begin
          cnt <= '0;
          if (out_of_range) begin
            phase <= PH_BURST;
            first <= 1'b1;
          end
        end
        PH_BURST: begin
          if (cnt == CW'(BURST_CYCLES - 1)) begin
            phase <= PH_GUARD;
            cnt   <= '0;
          end else
            cnt <= cnt + 1'b1;
        end
        PH_GUARD: begin
          if (cnt == CW'(GUARD_CYCLES - 1)) begin
            phase <= PH_FINE;
            cnt   <= '0;
          end else
            cnt <= cnt + 1'b1;
        end
        default: begin
          phase <= PH_FINE;
          cnt   <= '0;
        end
      endcase
    end
  end

  always_comb begin
    mod         = (phase == PH_BURST);
    guard       = (phase == PH_GUARD);
    burst_start = first;
  end

endmodule
