// ldo_plant: behavioural model of the analog half of the digital LDO, for
// simulation only (not synthesizable: real arithmetic).
//
// It stands for the three comparators, the coarse/fine/auxiliary PMOS
// arrays, the output capacitor and the load. Each PMOS unit is a switched
// conductance G_UNIT from V_IN to V_OUT (triode region); coarse units count
// 16 fine units, each auxiliary bit one unit (BETA bits give strength BETA).
// Once per CLK_FAST cycle the output node is integrated in NSUB Euler steps:
//   C_OUT * dV/dt = G_UNIT * units_on * (V_IN - V_OUT) - I_LOAD
// with the gate words as they were during that cycle. CMP1 is a clocked
// comparator that decides (V_OUT > V_REF) on the cycles flagged by
// cmp_sample; CMP2/CMP3 are continuous and follow V_OUT each cycle.
// aux_enable = 0 disconnects the auxiliary array (loop without the
// feed-forward path), for comparison. Electrical values: V_IN, V_REF, C_OUT
// and the load currents follow the reference design's operating point; the
// unit conductance and the window half-width are this model's own choices.
`timescale 1ns/1ps
module ldo_plant #(
  parameter int  N_COARSE = 64,
  parameter int  N_FINE   = 32,
  parameter int  BETA     = 2,
  parameter int  STRENGTH = 16,
  parameter real V_IN     = 1.0,      // V
  parameter real V_REF    = 0.5,      // V
  parameter real V_WIN    = 0.025,    // V, half-width of the detection window
  parameter real C_OUT    = 1.0e-9,   // F
  parameter real G_UNIT   = 0.3e-3,   // S per x1 unit
  parameter real T_CLK    = 2.0e-9,   // s, CLK_FAST period
  parameter int  NSUB     = 8
) (
  input  logic                clk,
  input  logic [N_COARSE-1:0] crs,
  input  logic [N_FINE-1:0]   fine,
  input  logic [BETA-1:0]     aux_off,
  input  logic                cmp_sample,
  input  logic                aux_enable,
  input  real                 i_load,     // A
  output logic                cmp_out,
  output logic                cmp2_out,
  output logic                cmp3_out,
  output real                 v_out,      // V
  output int                  units_on
);

  initial begin
    v_out    = 0.0;
    cmp_out  = 1'b0;
    cmp2_out = 1'b1;
    cmp3_out = 1'b0;
    units_on = 0;
  end

  always_comb begin
    int n;
    n = STRENGTH * (N_COARSE - $countones(crs)) + (N_FINE - $countones(fine));
    if (aux_enable) n += BETA - $countones(aux_off);
    units_on = n;
  end

  always @(posedge clk) begin
    real v, i_src, dt;
    v  = v_out;
    dt = T_CLK / NSUB;
    for (int k = 0; k < NSUB; k++) begin
      i_src = G_UNIT * units_on * (V_IN - v);
      v = v + (i_src - i_load) / C_OUT * dt;
      if (v < 0.0) v = 0.0;
    end
    v_out    <= v;
    cmp2_out <= (v < V_REF + V_WIN);
    cmp3_out <= (v > V_REF - V_WIN);
    if (cmp_sample) cmp_out <= (v > V_REF);
  end

endmodule
