// tb_trs_sys_ctrl: checks system control on its own.
//  - ISIS_ON / ISIS_INT gating by RUN_DAE, DATA_IS, DATA_MO and WDOG_B;
//  - the first pulse after reset only fires a 10 us LOAD_LL, later pulses
//    become ITP and start the limit-generator clock; PRE_SF stops it and
//    fires LOAD_LL again; GRST disarms;
//  - no ITP with DATA_LO or DATA_SM;
//  - IOFF 30 ms (300 R_CLK periods) after the last ISIS pulse.
`timescale 1ns/1ps
module tb_trs_sys_ctrl;
  import trs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tick, t_tick, r_tick;
  logic isis = 0, run_dae = 0, wdog_a = 0, wdog_b = 0, grst = 0, pre_sf = 0;
  trs_ctrl_t ctrl;
  logic isis_on, isis_int, itp, load_ll, l_clk_en, ioff;
  int checks = 0, failures = 0;
  int n_itp = 0, n_int = 0, n_on = 0, n_ioff = 0;
  longint load_len = 0, last_load_len = 0;
  realtime t_ioff = 0;
  logic itp_d = 0, int_d = 0, on_d = 0, load_d = 0;

  trs_clk_div u_clk (.m_clk(clk), .rst_n, .s_tick, .t_tick, .r_tick);
  trs_sys_ctrl dut (.m_clk(clk), .rst_n, .t_tick, .r_tick, .isis, .run_dae,
                    .ctrl, .wdog_a, .wdog_b, .grst, .pre_sf, .isis_on,
                    .isis_int, .itp, .load_ll, .l_clk_en, .ioff);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    itp_d <= itp; int_d <= isis_int; on_d <= isis_on; load_d <= load_ll;
    if (itp && !itp_d) n_itp++;
    if (isis_int && !int_d) n_int++;
    if (isis_on && !on_d) n_on++;
    if (ioff) begin n_ioff++; t_ioff = $realtime; end
    if (load_ll) load_len++;
    if (!load_ll && load_d) begin last_load_len = load_len; load_len = 0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse();
    isis = 1'b1; #400; isis = 1'b0; #20us;
  endtask

  task automatic counts(input int e_on, input int e_int, input int e_itp, input string what);
    check(n_on == e_on && n_int == e_int && n_itp == e_itp,
          $sformatf("%s: on=%0d int=%0d itp=%0d want %0d %0d %0d", what, n_on, n_int, n_itp, e_on, e_int, e_itp));
    n_on = 0; n_int = 0; n_itp = 0;
  endtask

  initial begin
    realtime t_last;
    ctrl = '0;
    #325 rst_n = 1'b1;
    n_itp = 0; n_int = 0; n_on = 0; n_ioff = 0;  // discard edges seen before reset
    #1us;
    // Not running: nothing enters.
    pulse(); counts(0, 0, 0, "run off");
    run_dae = 1'b1;
    #1us;
    // Running, TRS overridden (MO=0): ISIS_ON only.
    pulse(); counts(1, 0, 0, "override");
    ctrl.mo = 1'b1;
    ctrl.is = 1'b1;
    pulse(); counts(0, 0, 0, "DATA_IS blocks");
    ctrl.is = 1'b0;
    // First pulse: LOAD_LL only.
    check(!l_clk_en, "clock idle before first pulse");
    isis = 1'b1; #400; isis = 1'b0;
    #2us;
    check(load_ll && l_clk_en, "first pulse fires LOAD_LL and L_CLK");
    #20us;
    check(!load_ll && last_load_len >= 90 && last_load_len <= 110,
          $sformatf("LOAD_LL lasts 10 us (%0d cycles)", last_load_len));
    counts(1, 1, 0, "first pulse no ITP");
    // Second pulse: ITP, clock runs.
    pulse(); counts(1, 1, 1, "second pulse ITP");
    check(l_clk_en, "L_CLK running");
    pulse(); pulse(); counts(2, 2, 2, "more ITP");
    // PRE_SF stops the clock and reloads.
    pre_sf = 1'b1; #10us; pre_sf = 1'b0;
    #1us;
    check(!l_clk_en || load_ll, "PRE_SF stops running clock");
    #20us;
    check(!l_clk_en, "clock stopped after reload");
    check(last_load_len >= 90 && last_load_len <= 110, "LOAD_LL after PRE_SF");
    pulse(); counts(1, 1, 1, "next superframe first pulse is ITP");
    check(l_clk_en, "clock restarts");
    // GRST disarms.
    grst = 1'b1; #90us; grst = 1'b0;
    check(!l_clk_en, "GRST stops clock");
    pulse(); counts(1, 1, 0, "after GRST only reload");
    pulse(); counts(1, 1, 1, "then ITP again");
    // WDOG_B blocks ISIS_INT.
    wdog_b = 1'b1;
    pulse(); counts(1, 0, 0, "WDOG_B blocks");
    wdog_b = 1'b0;
    // DATA_LO / DATA_SM: no ITP.
    ctrl.lo = 1'b1; pulse(); counts(1, 1, 0, "DATA_LO no ITP"); ctrl.lo = 1'b0;
    ctrl.sm = 1'b1; pulse(); counts(1, 1, 0, "DATA_SM no ITP"); ctrl.sm = 1'b0;
    // IOFF: pulses every 20 ms give none; 30 ms after the last one gives one.
    n_ioff = 0;
    for (int i = 0; i < 5; i++) begin pulse(); #19980us; end
    check(n_ioff == 0, "no IOFF with 50 Hz pulses");
    isis = 1'b1; #400; isis = 1'b0;
    t_last = $realtime;
    #50ms;
    check(n_ioff == 1, $sformatf("one IOFF after loss (%0d)", n_ioff));
    check(t_ioff - t_last > 29.8ms && t_ioff - t_last < 30.3ms,
          $sformatf("IOFF after 30 ms (%0t)", t_ioff - t_last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
