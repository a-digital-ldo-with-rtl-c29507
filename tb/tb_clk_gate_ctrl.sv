// tb_clk_gate_ctrl: self-checking test of the sampling-clock divider and the
// clock-gating enables. Checks that the slow strobe comes exactly once every
// 10 fast cycles (500 MHz / 50 MHz), that the fine register is only enabled
// on that strobe with MOD = 0, that the coarse register is enabled on every
// cycle of MOD = 1 and on compensation requests, and that the comparator
// sampling enable is the union of the two.
`timescale 1ns/1ps
module tb_clk_gate_ctrl;
  localparam int DIV = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mod, comp, slow_tick, coarse_en, fine_en, sample_en;
  int checks = 0, failures = 0;
  int cyc, last_tick, ticks;

  clk_gate_ctrl dut (.clk, .rst_n, .mod, .comp, .slow_tick, .coarse_en, .fine_en, .sample_en);

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
    mod = 0; comp = 0; last_tick = -1; ticks = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      if ((cyc / 300) % 2 == 1) mod = 1'b1; else mod = 1'b0;
      comp = ($urandom_range(0, 7) == 0);
      #0.1;
      // reference divider: one count is taken between reset release and cycle 0, so the strobe falls in cycles 8, 18, ...
      check(slow_tick == (((cyc + 1) % DIV) == DIV - 1), "slow_tick position");
      check(fine_en == (slow_tick && !mod), "fine_en");
      check(coarse_en == (mod || comp), "coarse_en");
      check(sample_en == (coarse_en && mod || fine_en), "sample_en");
      if (slow_tick) begin
        if (last_tick >= 0) check(cyc - last_tick == DIV, "slow period");
        last_tick = cyc;
        ticks++;
      end
    end
    check(ticks == 5000 / DIV, "tick count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
