// tb_bidir_sr: self-checking test of the bidirectional shift register at its
// default width (64, the coarse register) and at 32 with a half-full reset
// (the fine register). Random shift enables and directions are applied; a
// counter model predicts the number of ones, from which the expected
// thermometer word and the full/empty flags are built independently.
// Occasional loads check the re-centring to half the width.
`timescale 1ns/1ps
module tb_bidir_sr;
  localparam int W0 = 64;
  localparam int W1 = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en0, up0, en1, up1, ld0, ld1;
  logic [W0-1:0] q0; logic full0, empty0;
  logic [W1-1:0] q1; logic full1, empty1;
  int checks = 0, failures = 0;
  int n0, n1;

  bidir_sr dut0 (.clk, .rst_n, .load(ld0), .en(en0), .up(up0), .q(q0), .full(full0), .empty(empty0));
  bidir_sr #(.WIDTH(W1), .RESET_ONES(W1/2)) dut1
    (.clk, .rst_n, .load(ld1), .en(en1), .up(up1), .q(q1), .full(full1), .empty(empty1));

  always #1 clk = ~clk;

  function automatic logic [W0-1:0] therm0(int n);
    logic [W0-1:0] v = '0;
    for (int i = 0; i < n; i++) v[W0-1-i] = 1'b1;
    return v;
  endfunction
  function automatic logic [W1-1:0] therm1(int n);
    logic [W1-1:0] v = '0;
    for (int i = 0; i < n; i++) v[W1-1-i] = 1'b1;
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_all();
    check(q0 == therm0(n0), $sformatf("q0=%h n0=%0d", q0, n0));
    check(full0 == (n0 == W0) && empty0 == (n0 == 0), "flags0");
    check(q1 == therm1(n1), $sformatf("q1=%h n1=%0d", q1, n1));
    check(full1 == (n1 == W1) && empty1 == (n1 == 0), "flags1");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en0 = 0; up0 = 0; en1 = 0; up1 = 0; ld0 = 0; ld1 = 0;
    n0 = W0; n1 = W1/2;
    repeat (3) @(posedge clk);
    #0.2 check_all();
    @(negedge clk) rst_n = 1'b1;
    // phases: drain down to empty, fill to full, then random walk
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if (cyc < 200)       begin en0 = 1; up0 = 0; en1 = 1; up1 = 0; end
      else if (cyc < 400)  begin en0 = 1; up0 = 1; en1 = 1; up1 = 1; end
      else begin
        en0 = ($urandom_range(0, 3) != 0); up0 = $urandom_range(0, 1);
        en1 = ($urandom_range(0, 1) != 0); up1 = ($urandom_range(0, 99) < 50);
      end
      ld0 = (cyc >= 400) && ($urandom_range(0, 49) == 0);
      ld1 = (cyc >= 400) && ($urandom_range(0, 29) == 0);
      @(posedge clk);
      if (ld0) n0 = W0 / 2;
      else if (en0) n0 = up0 ? ((n0 < W0) ? n0 + 1 : n0) : ((n0 > 0) ? n0 - 1 : n0);
      if (ld1) n1 = W1 / 2;
      else if (en1) n1 = up1 ? ((n1 < W1) ? n1 + 1 : n1) : ((n1 > 0) ? n1 - 1 : n1);
      #0.2 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
