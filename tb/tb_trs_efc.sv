// tb_trs_efc: checks external field control.
//  - an SFC gives EFA after (DLY+1) x 10 us lasting (LTH+1) x 10 us,
//    followed by a 10 us STOP_EFA (fixed and random register values, and the
//    longest delay of 655.35 ms);
//  - DATA_DO removes the delay; DATA_EO, DATA_MO low, WDOG_A at SFC, DLY=0
//    or LTH=0 stop the trigger;
//  - WDOG_A during the pulse masks EFA; without RUN_DAE there is no EFA
//    unless DATA_RN; DATA_FA holds EFA on during the run.
// Tolerance: one S_CLK period plus synchroniser cycles.
`timescale 1ns/1ps
module tb_trs_efc;
  import trs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tick, t_tick, r_tick;
  logic sfc = 0, wdog_a = 0, run_dae = 0;
  trs_ctrl_t ctrl;
  logic [15:0] reg_dly = '0, reg_lth = '0;
  logic efa, start_ul, stop_efa;
  int checks = 0, failures = 0;
  int n_efa = 0, n_stop = 0;
  longint cyc = 0, t_sfc = 0, t_efa_rise = 0, t_efa_fall = 0, t_stop_rise = 0, t_stop_fall = 0;
  logic efa_d = 0, stop_d = 0, sfc_d = 0;

  trs_clk_div u_clk (.m_clk(clk), .rst_n, .s_tick, .t_tick, .r_tick);
  trs_efc dut (.m_clk(clk), .rst_n, .s_tick, .t_tick, .sfc, .wdog_a, .run_dae,
               .ctrl, .reg_dly, .reg_lth, .efa, .start_ul, .stop_efa);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    efa_d <= efa; stop_d <= stop_efa; sfc_d <= sfc;
    if (sfc && !sfc_d) t_sfc = cyc;
    if (efa && !efa_d) begin n_efa++; t_efa_rise = cyc; end
    if (!efa && efa_d) t_efa_fall = cyc;
    if (stop_efa && !stop_d) begin n_stop++; t_stop_rise = cyc; end
    if (!stop_efa && stop_d) t_stop_fall = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input longint v, input longint want, input longint tol);
    return (v >= want - tol) && (v <= want + tol);
  endfunction

  task automatic fire();
    @(posedge clk) sfc <= 1'b1;
    #400;
    @(posedge clk) sfc <= 1'b0;
  endtask

  // SFC, then wait for the whole sequence to finish.
  task automatic shot(input int dly, input int lth, input bit no_delay, input string what);
    longint want_d, want_l;
    reg_dly = 16'(dly); reg_lth = 16'(lth);
    n_efa = 0; n_stop = 0;
    fire();
    #((dly + lth + 5) * 10us);
    want_d = no_delay ? 0 : 100 * longint'(dly + 1);
    want_l = 100 * longint'(lth + 1);
    check(n_efa == 1 && n_stop == 1, $sformatf("%s: efa=%0d stop=%0d", what, n_efa, n_stop));
    check(near(t_efa_rise - t_sfc, want_d, 4),
          $sformatf("%s: delay %0d cycles, want %0d", what, t_efa_rise - t_sfc, want_d));
    check(near(t_efa_fall - t_efa_rise, want_l, 4),
          $sformatf("%s: length %0d cycles, want %0d", what, t_efa_fall - t_efa_rise, want_l));
    check(near(t_stop_fall - t_stop_rise, 100, 10), "STOP_EFA 10 us");
  endtask

  task automatic none(input string what);
    n_efa = 0;
    fire();
    #3ms;
    check(n_efa == 0 && !start_ul, $sformatf("%s: no EFA", what));
  endtask

  initial begin
    ctrl = '0;
    ctrl.mo = 1'b1;
    #325 rst_n = 1'b1;
    n_efa = 0; n_stop = 0;  // discard edges seen before reset
    run_dae = 1'b1;
    #1us;
    shot(199, 99, 0, "2 ms delay, 1 ms length");
    for (int i = 0; i < 3; i++) shot(int'($urandom_range(40, 1)), int'($urandom_range(40, 1)), 0, "random");
    shot(1, 1, 0, "minimum");
    shot(65534, 2, 0, "longest delay, 655.35 ms");
    ctrl.do_ = 1'b1;
    shot(50, 20, 1, "DATA_DO");
    ctrl.do_ = 1'b0;
    reg_dly = 16'd10; reg_lth = 16'd10;
    ctrl.eo = 1'b1; none("DATA_EO"); ctrl.eo = 1'b0;
    ctrl.mo = 1'b0; none("override"); ctrl.mo = 1'b1;
    wdog_a = 1'b1; none("WDOG_A"); wdog_a = 1'b0;
    reg_dly = 16'd0; none("DLY=0");
    reg_dly = 16'd10; reg_lth = 16'd0; none("LTH=0");
    // WDOG_A during the pulse masks the output.
    reg_dly = 16'd5; reg_lth = 16'd50;
    fire();
    #100us;
    check(efa && start_ul, "EFA on");
    wdog_a = 1'b1; #1us;
    check(!efa && start_ul, "WDOG_A masks EFA");
    wdog_a = 1'b0; #1us;
    check(efa, "EFA back");
    #600us;
    // No run: no EFA unless DATA_RN.
    run_dae = 1'b0;
    none("run off");
    ctrl.rn = 1'b1;
    fire(); #100us;
    check(efa, "DATA_RN: EFA outside run");
    #600us;
    ctrl.rn = 1'b0;
    check(!efa, "EFA off");
    run_dae = 1'b1;
    ctrl.fa = 1'b1; #1us;
    check(efa, "DATA_FA holds EFA on");
    run_dae = 1'b0; #1us;
    check(!efa, "DATA_FA needs run");
    ctrl.fa = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3s;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
