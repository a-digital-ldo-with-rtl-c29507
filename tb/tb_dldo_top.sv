// tb_dldo_top: end-to-end test of the digital LDO controller at its default
// sizes (64 x16 coarse units, 32 x1 fine units, beta = 2, 500/50 MHz,
// 128-cycle burst) closed around the behavioural plant ldo_plant.
//
// Sequence: start-up at 2 mA; a 2 -> 100 mA load step with a 20 ns edge; a
// 100 -> 2 mA step; a slow 2 -> 20 mA ramp and back, which the fine loop
// follows through regulation compensation without a burst. Checked all
// along: every MOD pulse lasts exactly 128 fast cycles; the fine word holds
// still during a burst; outside a burst the coarse word moves only on a
// compensation step; the fine word moves only on 50 MHz sampling instants
// (multiples of 10 fast cycles apart); after each event V_OUT settles back
// inside the detection window. Each mechanism (under- and overshoot burst,
// guard period, compensation up and down, fine steps, feed-forward aux
// switching) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_dldo_top;
  localparam int  NC = 64, NF = 32, BETA = 2, STRENGTH = 16;
  localparam int  T1 = 128, DIV = 10;
  localparam real VREF = 0.5, VWIN = 0.025;

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

  int checks = 0, failures = 0;
  longint cyc = 0;

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
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- mechanism counters and cycle-level rules ----------------
  int n_burst_under = 0, n_burst_over = 0, n_guard = 0;
  int n_comp_up = 0, n_comp_dn = 0, n_fine_steps = 0, n_aux_toggles = 0;
  int n_crs_burst_steps = 0;
  int mod_run = 0;
  longint last_fine_change = -1;
  logic [NC-1:0] crs_q;
  logic [NF-1:0] fine_q;
  logic mod_q = 1'b0, guard_q = 1'b0, comp_q = 1'b0, comp_up_q = 1'b0;
  logic [BETA-1:0] aux_q;

  function automatic int cmb(logic [NC-1:0] c, logic [NF-1:0] f);
    return STRENGTH * $countones(c) + $countones(f);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // values of the previous cycle vs. now (sampled before this edge's update)
      if (mod && !mod_q) begin
        if (v_out < VREF) n_burst_under++; else n_burst_over++;
      end
      if (guard && !guard_q) n_guard++;
      if (mod) mod_run++;
      else if (mod_run != 0) begin
        check(mod_run == T1, $sformatf("burst lasted %0d cycles", mod_run));
        mod_run = 0;
      end
      if (fine != fine_q) begin
        n_fine_steps++;
        check(!mod_q, "fine word changed during a burst");
        if (last_fine_change >= 0)
          check((cyc - last_fine_change) % DIV == 0, "fine step off the 50 MHz grid");
        last_fine_change = cyc;
      end
      if (crs != crs_q) begin
        if (mod_q) n_crs_burst_steps++;
        else begin
          check(comp_q, "coarse word moved outside a burst without compensation");
          check(($countones(crs) > $countones(crs_q)) == comp_up_q, "compensation direction");
        end
      end
      if (comp) begin
        if (comp_up) n_comp_up++; else n_comp_dn++;
      end
      if (aux_off != aux_q) n_aux_toggles++;
    end
    crs_q = crs; fine_q = fine; mod_q = mod; guard_q = guard;
    comp_q = comp; comp_up_q = comp_up; aux_q = aux_off;
  end

  // ---------------- helpers ----------------
  task automatic run(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic ramp(real to, int cycles);
    real from = i_load;
    for (int k = 1; k <= cycles; k++) begin
      @(posedge clk);
      i_load = from + (to - from) * k / cycles;
    end
  endtask

  // Mean and extremes of V_OUT over n cycles; fraction of time inside window.
  task automatic settle_check(string tag, int n);
    real vsum = 0.0, vmin = 10.0, vmax = -10.0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      vsum += v_out;
      if (v_out < vmin) vmin = v_out;
      if (v_out > vmax) vmax = v_out;
    end
    $display("%s: I_LOAD=%0.1f mA  V_OUT mean=%0.4f min=%0.4f max=%0.4f  CRS=%0d FINE=%0d CMB=%0d",
             tag, i_load * 1e3, vsum / n, vmin, vmax, $countones(crs), $countones(fine), cmb(crs, fine));
    check(!mod, {tag, ": settled outside a burst"});
    check(vmin > VREF - VWIN && vmax < VREF + VWIN, {tag, ": V_OUT inside the window"});
    check(vsum / n > VREF - 0.01 && vsum / n < VREF + 0.01, {tag, ": mean V_OUT near V_REF"});
  endtask

  initial begin
    #4ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bursts_before;
    run(3);
    @(negedge clk) rst_n = 1'b1;
    // reset words: all coarse PMOS off, fine half off
    #0.1;
    check($countones(crs) == NC && $countones(fine) == NF / 2, "reset words");

    // start-up at light load
    run(10000);
    settle_check("start-up 2 mA", 2000);

    // 2 -> 100 mA in 20 ns
    bursts_before = n_burst_under;
    ramp(100.0e-3, 10);
    run(10000);
    check(n_burst_under > bursts_before, "undershoot triggered a burst");
    settle_check("after 2->100 mA step", 2000);

    // 100 -> 2 mA in 20 ns
    bursts_before = n_burst_over;
    ramp(2.0e-3, 10);
    run(10000);
    check(n_burst_over > bursts_before, "overshoot triggered a burst");
    settle_check("after 100->2 mA step", 2000);

    // slow ramps: followed by fine tuning plus regulation compensation only
    bursts_before = n_burst_under + n_burst_over;
    ramp(20.0e-3, 20000);
    run(2000);
    settle_check("after slow ramp to 20 mA", 2000);
    ramp(2.0e-3, 20000);
    run(2000);
    settle_check("after slow ramp to 2 mA", 2000);
    check(n_burst_under + n_burst_over == bursts_before, "slow ramps needed no burst");

    $display("bursts: undershoot=%0d overshoot=%0d guard=%0d coarse steps in bursts=%0d",
             n_burst_under, n_burst_over, n_guard, n_crs_burst_steps);
    $display("compensation: up=%0d down=%0d  fine steps=%0d  aux toggles=%0d",
             n_comp_up, n_comp_dn, n_fine_steps, n_aux_toggles);
    check(n_burst_under > 0, "mechanism: undershoot burst");
    check(n_burst_over > 0, "mechanism: overshoot burst");
    check(n_guard > 0, "mechanism: guard period");
    check(n_crs_burst_steps > 0, "mechanism: coarse tuning at CLK_FAST");
    check(n_comp_up > 0, "mechanism: compensation up");
    check(n_comp_dn > 0, "mechanism: compensation down");
    check(n_fine_steps > 0, "mechanism: fine tuning");
    check(n_aux_toggles > 0, "mechanism: feed-forward aux switching");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
