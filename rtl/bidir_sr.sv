// bidir_sr: serial-in, parallel-out bidirectional shift register used as the
// integrator of the digital LDO loop (both the coarse and the fine register).
//
// Bit q[i] drives the gate of power transistor Q_(i+1); a 1 turns that PMOS
// off. The word is kept as a thermometer code with its ones at the top end,
// so the number of ones is the number of PMOS turned off (CRS or FINE).
// A shift "up" feeds a 1 in at the Q_WIDTH end (one more PMOS off, less
// current); a shift "down" feeds a 0 in at the Q1 end (one more PMOS on).
// At either end the word saturates, because the shift then repeats the bit
// already there. This is the usual S/R of a digital LDO; the reset value is
// this design's choice (RESET_ONES, default all off for a soft start).
// A synchronous load puts LOAD_ONES ones in the word; the regulation
// compensation uses it to re-centre the fine register (this design's choice).
//
// Interface: en = this register's (gated) clock is active in this cycle,
// up = direction, load = re-centre (takes priority over en).
// full/empty flag the ends of the range and are used by the
// regulation compensation. Timing: q changes one cycle after en is sampled.
module bidir_sr #(
  parameter int unsigned WIDTH      = 64,
  parameter int unsigned RESET_ONES = WIDTH,
  parameter int unsigned LOAD_ONES  = WIDTH / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,   // load LOAD_ONES ones (wins over en)
  input  logic             en,     // shift in this cycle
  input  logic             up,     // 1: one more PMOS off, 0: one more PMOS on
  output logic [WIDTH-1:0] q,      // q[0] = Q1 ... q[WIDTH-1] = Q_WIDTH
  output logic             full,   // every PMOS off
  output logic             empty   // every PMOS on
);

  localparam logic [WIDTH-1:0] ALL_ONES  = {WIDTH{1'b1}};
  localparam logic [WIDTH-1:0] RESET_VAL = ~(ALL_ONES >> RESET_ONES);
  localparam logic [WIDTH-1:0] LOAD_VAL  = ~(ALL_ONES >> LOAD_ONES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= RESET_VAL;
    else if (load)
      q <= LOAD_VAL;
    else if (en) begin
      if (up) q <= {1'b1, q[WIDTH-1:1]};
      else    q <= {q[WIDTH-2:0], 1'b0};
    end
  end

  // In a thermometer word with the ones on top, Q1 is 1 only when all are 1
  // and Q_WIDTH is 0 only when all are 0.
  assign full  = q[0];
  assign empty = ~q[WIDTH-1];

  // The word must stay a thermometer code: adding one at the bottom end of a
  // top-aligned run of ones never leaves a hole. With the ones on top,
  // the inverted word is 2^k - 1, which has no bit in common with itself + 1.
  a_thermo: assert property (@(posedge clk) disable iff (!rst_n)
                             ((~q) & ((~q) + 1'b1)) == '0)
    else $error("bidir_sr: word is not a thermometer code");

endmodule
