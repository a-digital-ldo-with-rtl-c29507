// peak_detector: digital half of the under/overshoot (window) detector.
//
// Two comparators outside this block compare V_OUT with the window limits:
// cmp2_out = 1 while V_OUT < V_REF_H and cmp3_out = 1 while V_OUT > V_REF_L.
// Inside the window both are 1; above it only cmp3_out is 1 and below it
// only cmp2_out is 1, so their exclusive-OR is 1 exactly when V_OUT has left
// the window. The XOR follows the reference design. The comparator outputs
// are asynchronous to CLK_FAST, so each first passes a SYNC_STAGES-flop
// synchroniser (this design's choice); out_of_range is therefore a
// registered signal that follows the comparators SYNC_STAGES cycles later.
// Reset makes both synchronisers read "inside the window".
module peak_detector #(
  parameter int unsigned SYNC_STAGES = dldo_pkg::CFG_SYNC_STAGES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmp2_out,      // CMP2: V_OUT below V_REF_H
  input  logic cmp3_out,      // CMP3: V_OUT above V_REF_L
  output logic out_of_range,  // V_OUT outside [V_REF_L, V_REF_H]
  output logic overshoot,     // out of range on the high side
  output logic undershoot     // out of range on the low side
);

  logic [SYNC_STAGES-1:0] sync2, sync3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync2 <= '1;
      sync3 <= '1;
    end else begin
      sync2 <= {sync2[SYNC_STAGES-2:0], cmp2_out};
      sync3 <= {sync3[SYNC_STAGES-2:0], cmp3_out};
    end
  end

  logic c2, c3;
  always_comb begin
    c2           = sync2[SYNC_STAGES-1];
    c3           = sync3[SYNC_STAGES-1];
    out_of_range = c2 ^ c3;
    overshoot    = out_of_range && !c2;
    undershoot   = out_of_range && !c3;
  end

endmodule
