// tb_trs_superframe_reg: checks the superframe register.
// ISIS_INT pulses (0.4 us) are driven every 1 ms; every pulse that is not
// let out as SFC is followed by an IFC pulse, as the comparator would give.
// Checks:
//  - with register 2172 = N-1, SFC and DAE come every N pulses and a 10 us
//    PRE_SF follows the (N-1)th IFC;
//  - the gate closes 4 us after SFC (a second pulse 10 us later is blocked);
//  - WDOG_A blocks DAE but not SFC; GRST clears count and gate;
//  - DATA_LO counts ISIS_INT, DATA_SM passes every pulse, DATA_SR sends every
//    pulse to the DAE and gives F2P_RST during GRST, DATA_MO low bypasses.
`timescale 1ns/1ps
module tb_trs_superframe_reg;
  import trs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tick, t_tick, r_tick;
  logic isis_on = 0, isis_int = 0, ifc = 0, grst = 0, wdog_a = 0;
  trs_ctrl_t ctrl;
  logic [15:0] reg_sfm = '0;
  logic dae, sfc, pre_sf, f2p_rst_n;
  logic [15:0] frame_count;
  int checks = 0, failures = 0;
  int n_sfc = 0, n_dae = 0, n_pre = 0;
  longint cyc = 0, t_pre_rise = 0, t_pre_fall = 0;
  logic sfc_d = 0, dae_d = 0, pre_d = 0;
  bit give_ifc = 1'b1;

  trs_clk_div u_clk (.m_clk(clk), .rst_n, .s_tick, .t_tick, .r_tick);
  trs_superframe_reg dut (.m_clk(clk), .rst_n, .t_tick, .isis_on, .isis_int,
                          .ifc, .grst, .wdog_a, .ctrl, .reg_sfm, .dae, .sfc,
                          .pre_sf, .f2p_rst_n, .frame_count);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    sfc_d <= sfc; dae_d <= dae; pre_d <= pre_sf;
    if (sfc && !sfc_d) n_sfc++;
    if (dae && !dae_d) n_dae++;
    if (pre_sf && !pre_d) begin n_pre++; t_pre_rise = cyc; end
    if (!pre_sf && pre_d) t_pre_fall = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One ISIS frame; returns 1 if it was let out as SFC.
  task automatic frame(output bit was_sfc);
    int s0;
    s0 = n_sfc;
    isis_on = 1'b1; isis_int = ctrl.mo;
    #400;
    isis_on = 1'b0; isis_int = 1'b0;
    #200;
    was_sfc = (n_sfc != s0);
    if (!was_sfc && give_ifc && !ctrl.sm) begin
      #1us ifc = 1'b1; #170us ifc = 1'b0;
    end
    #1ms;
  endtask

  task automatic frames(input int k);
    bit s;
    repeat (k) frame(s);
  endtask

  task automatic clear_counts();
    n_sfc = 0; n_dae = 0; n_pre = 0;
  endtask

  // Run until the next SFC, then count pulses between SFCs over m superframes.
  task automatic superframes(input int n, input int m, input string what);
    bit s;
    int k, guard;
    guard = 0;
    do begin frame(s); guard++; end while (!s && guard < 3 * n + 5);
    clear_counts();
    for (int i = 0; i < m; i++) begin
      k = 0;
      do begin frame(s); k++; end while (!s && k < 3 * n + 5);
      check(k == n, $sformatf("%s: superframe %0d has %0d frames, want %0d", what, i, k, n));
    end
  endtask

  initial begin
    ctrl = '0;
    ctrl.mo = 1'b1;
    #325 rst_n = 1'b1;
    n_sfc = 0; n_dae = 0; n_pre = 0;  // discard edges seen before reset
    #1us;
    // Normal superframes of N frames.
    for (int t = 0; t < 3; t++) begin
      int n;
      n = (t == 0) ? 3 : int'($urandom_range(8, 2));
      reg_sfm = 16'(n - 1);
      superframes(n, 3, "normal");
      check(n_sfc == 3 && n_dae == 3 && n_pre == 3,
            $sformatf("counts sfc=%0d dae=%0d pre=%0d", n_sfc, n_dae, n_pre));
      check(t_pre_fall - t_pre_rise >= 90 && t_pre_fall - t_pre_rise <= 101,
            $sformatf("PRE_SF width %0d", t_pre_fall - t_pre_rise));
    end
    // Gate closes 4 us after SFC.
    reg_sfm = 16'd2;
    superframes(3, 1, "before gate test");
    frames(1);  // count 1
    frames(1);  // count 2 -> PRE_SF, gate opens
    clear_counts();
    isis_int = 1'b1; #400; isis_int = 1'b0;
    #10us;
    isis_int = 1'b1; #400; isis_int = 1'b0;
    #10us;
    check(n_sfc == 1, $sformatf("gate closes after SFC (%0d)", n_sfc));
    frames(2);
    // WDOG_A blocks DAE but not SFC.
    wdog_a = 1'b1;
    superframes(3, 2, "wdog_a");
    check(n_sfc == 2 && n_dae == 0, "WDOG_A blocks DAE");
    wdog_a = 1'b0;
    // GRST mid-superframe restarts the count and closes the gate.
    superframes(3, 1, "before grst");
    frames(1);
    check(frame_count == 16'd1, "count 1");
    grst = 1'b1; #90us; grst = 1'b0;
    check(frame_count == 16'd0, "GRST clears count");
    check(f2p_rst_n, "no F2P_RST outside superperiod mode");
    clear_counts();
    frames(2);
    check(n_pre == 1 && n_sfc == 0, "dummy superframe after GRST");
    // DATA_LO: ISIS_INT pulses themselves are counted.
    ctrl.lo = 1'b1; give_ifc = 1'b0;
    superframes(3, 1, "DATA_LO, N=3");
    reg_sfm = 16'd3;
    superframes(4, 2, "DATA_LO");
    ctrl.lo = 1'b0; give_ifc = 1'b1;
    // DATA_SM: every pulse is a superframe.
    ctrl.sm = 1'b1;
    clear_counts();
    frames(5);
    check(n_sfc == 5 && n_dae == 5 && n_pre == 0, "DATA_SM passes every pulse");
    ctrl.sm = 1'b0;
    // DATA_SR: every pulse to DAE, SFC still every N.
    ctrl.sr = 1'b1; ctrl.lo = 1'b1; give_ifc = 1'b0;
    reg_sfm = 16'd3;
    superframes(4, 2, "superperiod");
    check(n_dae == 8 && n_sfc == 2, $sformatf("superperiod dae=%0d sfc=%0d", n_dae, n_sfc));
    grst = 1'b1; #1us;
    check(!f2p_rst_n, "F2P_RST during GRST in superperiod mode");
    #89us grst = 1'b0; #1us;
    check(f2p_rst_n, "F2P_RST released");
    ctrl.sr = 1'b0; ctrl.lo = 1'b0; give_ifc = 1'b1;
    // Override: ISIS_ON straight to DAE.
    ctrl.mo = 1'b0;
    clear_counts();
    frames(4);
    check(n_dae == 4 && n_sfc == 0, "override passes ISIS_ON");
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
