// tb_peak_detector: self-checking test of the window-detector logic. The two
// comparator outputs are driven with random window positions (inside, above,
// below); the expected out-of-range flag and side, delayed by the two
// synchroniser stages, come from a model kept in the testbench.
`timescale 1ns/1ps
module tb_peak_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp2_out, cmp3_out, out_of_range, overshoot, undershoot;
  int checks = 0, failures = 0;
  int pos_hist[3];   // 0 inside, 1 above V_REF_H, 2 below V_REF_L
  int n_over = 0, n_under = 0;

  peak_detector dut (.clk, .rst_n, .cmp2_out, .cmp3_out, .out_of_range, .overshoot, .undershoot);

  always #1 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos;
    cmp2_out = 1; cmp3_out = 1;
    pos_hist = '{0, 0, 0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      pos = $urandom_range(0, 2);
      cmp2_out = (pos != 1);   // V_OUT below V_REF_H unless above the window
      cmp3_out = (pos != 2);   // V_OUT above V_REF_L unless below the window
      @(posedge clk);
      pos_hist[2] = pos_hist[1];
      pos_hist[1] = pos_hist[0];
      pos_hist[0] = pos;
      #0.1;
      check(out_of_range == (pos_hist[1] != 0), "out_of_range");
      check(overshoot == (pos_hist[1] == 1), "overshoot");
      check(undershoot == (pos_hist[1] == 2), "undershoot");
      if (overshoot) n_over++;
      if (undershoot) n_under++;
    end
    check(n_over > 0 && n_under > 0, "both sides seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
