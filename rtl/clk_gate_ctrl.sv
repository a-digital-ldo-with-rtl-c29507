// clk_gate_ctrl: sampling clocks and clock gating of the two shift registers.
//
// The loop samples at CLK_FAST (500 MHz) in coarse-tuning mode and at
// CLK_SLOW (50 MHz) in fine-tuning mode, and each register is clock gated so
// that only one of them runs in each mode. Here CLK_SLOW is derived from
// CLK_FAST by a divide-by-SLOW_DIV counter and both gated clocks are expressed
// as clock enables of CLK_FAST flops, which a synthesis flow maps onto
// integrated clock-gating cells. Deriving CLK_SLOW locally instead of taking
// a second clock input is this design's choice; it keeps the whole
// controller in one clock domain.
//
// Interface (all one-cycle enables, registered divider, combinational gates):
//   slow_tick  - one CLK_FAST cycle in every SLOW_DIV: the CLK_SLOW edge
//   coarse_en  - coarse S/R clocked: every cycle while MOD = 1, or on a
//                regulation-compensation request
//   fine_en    - fine S/R clocked: on slow_tick while MOD = 0
//   sample_en  - the comparator CMP1 decides in this cycle (either S/R clock)
module clk_gate_ctrl #(
  parameter int unsigned SLOW_DIV = dldo_pkg::CFG_SLOW_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mod,        // MOD: 1 = coarse tuning (burst), 0 = fine tuning
  input  logic comp,       // regulation compensation asks for one coarse step
  output logic slow_tick,
  output logic coarse_en,
  output logic fine_en,
  output logic sample_en
);

  localparam int unsigned CW = (SLOW_DIV > 1) ? $clog2(SLOW_DIV) : 1;

  logic [CW-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      div_cnt <= '0;
    else if (div_cnt == CW'(SLOW_DIV - 1))
      div_cnt <= '0;
    else
      div_cnt <= div_cnt + 1'b1;
  end

  always_comb begin
    slow_tick = (div_cnt == CW'(SLOW_DIV - 1));
    fine_en   = slow_tick && !mod;
    coarse_en = mod || comp;
    sample_en = mod || fine_en;
  end

endmodule
