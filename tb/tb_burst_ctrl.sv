// tb_burst_ctrl: self-checking test of the burst-mode control logic at its
// default sizes. Detections are applied as single pulses, as long levels
// and during the guard period. Checks: MOD rises the cycle after a detection
// in fine mode, stays high for exactly 128 cycles (dT1 = 256 ns at 500 MHz),
// the guard period that follows lasts 128 cycles, and a detection inside the
// guard period starts no burst.
`timescale 1ns/1ps
module tb_burst_ctrl;
  import dldo_pkg::*;
  localparam int T1 = 128;
  localparam int T2 = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic oor, mod, guard, burst_start;
  phase_e phase;
  int checks = 0, failures = 0;
  int bursts = 0, ignored = 0;

  burst_ctrl dut (.clk, .rst_n, .out_of_range(oor), .mod, .guard, .burst_start, .phase);

  always #1 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference model: phase and remaining cycles.
  int m_phase = 0, m_left = 0;   // 0 fine, 1 burst, 2 guard
  task automatic model_step(bit det);
    case (m_phase)
      0: if (det) begin m_phase = 1; m_left = T1; bursts++; end
      1: begin m_left--; if (m_left == 0) begin m_phase = 2; m_left = T2; end end
      2: begin if (det) ignored++; m_left--; if (m_left == 0) m_phase = 0; end
      default: ;
    endcase
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int high_run = 0;
  initial begin
    oor = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // mostly quiet, occasional single pulses and long levels
      if ((cyc % 2000) >= 700 && (cyc % 2000) < 1100) oor = 1'b1;
      else oor = ($urandom_range(0, 299) == 0);
      @(posedge clk);
      model_step(oor);
      #0.1;
      check(mod == (m_phase == 1), "mod");
      check(guard == (m_phase == 2), "guard");
      check(phase == phase_e'(m_phase), "phase");
      check(burst_start == (m_phase == 1 && m_left == T1), "burst_start");
      if (mod) high_run++;
      else if (high_run != 0) begin
        check(high_run == T1, $sformatf("burst length %0d", high_run));
        high_run = 0;
      end
    end
    check(bursts > 3, "bursts seen");
    check(ignored > 0, "detections ignored in guard");
    $display("bursts=%0d ignored_in_guard=%0d", bursts, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
