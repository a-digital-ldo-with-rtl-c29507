// tb_lco_modes: steady-state limit-cycle-oscillation (LCO) sweep of the
// complete controller in closed loop with the behavioural plant, at the
// default sizes. For each load current of the sweep (2, 5.3, 14.1, 37.6 and
// 100 mA) the loop is brought to steady state and the comparator decisions
// at the 50 MHz sampling instants are recorded. The LCO mode M is the LCO
// period over twice the sampling period, i.e. the mean length of a run of
// equal decisions. The sweep is run once with the auxiliary feed-forward
// array connected and once without it.
// Checks: with the feed-forward path the mode is never higher than without
// it, and is lower at the lightest load; at the two heaviest loads, where
// the plant's output pole is faster than the 20 ns sampling period, the path
// gives mode 1; no burst fires in steady state with the path; the
// peak-to-peak ripple with the path is no larger than without it.
// At light load the plant's output pole (C_OUT against the conductance of
// the few PMOS units that are on) is much slower than the sampling period,
// and this first-order model then settles in mode 2 to 4 even with the
// path; the table printed at the end shows the values.
`timescale 1ns/1ps
module tb_lco_modes;
  localparam int  NC = 64, NF = 32, BETA = 2;
  localparam int  NLOAD = 5;
  localparam int  NSAMP = 400;
  localparam real LOADS[NLOAD] = '{2.0e-3, 5.3e-3, 14.1e-3, 37.6e-3, 100.0e-3};

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp_out, cmp2_out, cmp3_out;
  logic [NC-1:0] crs;
  logic [NF-1:0] fine;
  logic [BETA-1:0] aux_off;
  logic mod, cmp_sample, guard, comp, comp_up;
  logic aux_enable = 1'b1;
  real  i_load = 2.0e-3;
  real  v_out;
  int   units_on;
  int   checks = 0, failures = 0;

  dldo_top dut (
    .clk_fast(clk), .rst_n, .cmp_out, .cmp2_out, .cmp3_out,
    .crs, .fine, .aux_off, .mod, .cmp_sample, .guard, .comp, .comp_up
  );

  ldo_plant plant (
    .clk, .crs, .fine, .aux_off, .cmp_sample, .aux_enable, .i_load,
    .cmp_out, .cmp2_out, .cmp3_out, .v_out, .units_on
  );

  always #1 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Brings the loop to the load, then measures mode, ripple and bursts.
  task automatic measure(real load, output real mode, output real ripple, output int bursts);
    int  runs = 0, n = 0;
    logic last;
    real vmin = 10.0, vmax = -10.0;
    bit  mod_q = 0;
    // slow approach so that the loop tracks, then let it settle
    real from = i_load;
    for (int k = 1; k <= 20000; k++) begin
      @(posedge clk);
      i_load = from + (load - from) * k / 20000;
    end
    repeat (20000) @(posedge clk);
    bursts = 0;
    while (n < NSAMP) begin
      @(posedge clk);
      if (mod && !mod_q) bursts++;
      mod_q = mod;
      if (v_out < vmin) vmin = v_out;
      if (v_out > vmax) vmax = v_out;
      // the decision taken at the previous sampling instant is now stable
      if (cmp_sample && !mod) begin
        #0.1;
        if (n == 0 || cmp_out != last) runs++;
        last = cmp_out;
        n++;
      end
    end
    mode   = real'(NSAMP) / runs;
    ripple = vmax - vmin;
  endtask

  real mode_ff[NLOAD], mode_no[NLOAD], rip_ff[NLOAD], rip_no[NLOAD];
  int  b_ff[NLOAD], b_no[NLOAD];

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (20000) @(posedge clk);
    aux_enable = 1'b1;
    for (int i = 0; i < NLOAD; i++) measure(LOADS[i], mode_ff[i], rip_ff[i], b_ff[i]);
    aux_enable = 1'b0;
    for (int i = 0; i < NLOAD; i++) measure(LOADS[i], mode_no[i], rip_no[i], b_no[i]);
    $display(" I_LOAD(mA) | mode with FF | ripple (mV) | mode w/o FF | ripple (mV) | bursts w/o FF");
    for (int i = 0; i < NLOAD; i++) begin
      $display(" %9.1f  | %12.2f | %11.2f | %11.2f | %11.2f | %13d",
               LOADS[i] * 1e3, mode_ff[i], rip_ff[i] * 1e3, mode_no[i], rip_no[i] * 1e3, b_no[i]);
      check(mode_ff[i] <= mode_no[i], $sformatf("feed-forward does not raise the mode at %0.1f mA", LOADS[i] * 1e3));
      if (LOADS[i] > 30.0e-3)
        check(mode_ff[i] > 0.99 && mode_ff[i] < 1.01, $sformatf("mode 1 with feed-forward at %0.1f mA", LOADS[i] * 1e3));
      check(b_ff[i] == 0, $sformatf("no burst in steady state at %0.1f mA", LOADS[i] * 1e3));
      check(rip_ff[i] <= rip_no[i] + 1e-6, $sformatf("ripple not larger with feed-forward at %0.1f mA", LOADS[i] * 1e3));
    end
    check(mode_no[0] > mode_ff[0] + 1.0, "feed-forward lowers the mode at the lightest load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
