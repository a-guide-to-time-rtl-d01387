// tb_trs_watchdog: checks both watchdogs.
//  - WDOG_A: set by GRST, stays high through the first SFC and is cleared
//    4 us after it; a later SFC does not set it again;
//  - WDOG_B: not set by a plain GRST; set at the end of a GRST that follows
//    IOFF; cleared at the end of the 10th ISIS_ON pulse; GRST or LOAD_LL in
//    the middle restart the count.
`timescale 1ns/1ps
module tb_trs_watchdog;
  import trs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tick, t_tick, r_tick;
  logic grst = 0, sfc = 0, ioff = 0, isis_on = 0, load_ll = 0;
  logic wdog_a, wdog_b;
  logic [3:0] b_count;
  int checks = 0, failures = 0;
  longint cyc = 0, t_sfc = 0, t_a_fall = 0;
  logic a_d = 0, sfc_d = 0;

  trs_clk_div u_clk (.m_clk(clk), .rst_n, .s_tick, .t_tick, .r_tick);
  trs_watchdog dut (.m_clk(clk), .rst_n, .t_tick, .grst, .sfc, .ioff, .isis_on,
                    .load_ll, .wdog_a, .wdog_b, .b_count);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    a_d <= wdog_a; sfc_d <= sfc;
    if (sfc && !sfc_d) t_sfc = cyc;
    if (!wdog_a && a_d) t_a_fall = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_grst();
    @(posedge clk) grst <= 1'b1;
    #90us;
    @(posedge clk) grst <= 1'b0;
    #1us;
  endtask

  task automatic do_sfc();
    @(posedge clk) sfc <= 1'b1;
    #400;
    @(posedge clk) sfc <= 1'b0;
    #20us;
  endtask

  task automatic on_pulses(input int k);
    repeat (k) begin
      @(posedge clk) isis_on <= 1'b1;
      #400;
      @(posedge clk) isis_on <= 1'b0;
      #100us;
    end
  endtask

  initial begin
    #325 rst_n = 1'b1;
    #1us;
    check(!wdog_a && !wdog_b, "idle after reset");
    do_sfc();
    check(!wdog_a, "SFC alone does not set WDOG_A");
    do_grst();
    check(wdog_a && !wdog_b, "plain GRST sets WDOG_A only");
    #1ms;
    check(wdog_a, "WDOG_A held");
    do_sfc();
    check(!wdog_a, "WDOG_A cleared after SFC");
    check(t_a_fall - t_sfc >= 30 && t_a_fall - t_sfc <= 42,
          $sformatf("WDOG_A cleared ~4 us after SFC (%0d)", t_a_fall - t_sfc));
    do_sfc();
    check(!wdog_a, "later SFC keeps WDOG_A low");
    // Source failure: IOFF then GRST.
    @(posedge clk) ioff <= 1'b1; @(posedge clk) ioff <= 1'b0;
    @(posedge clk) grst <= 1'b1;
    #1us;
    check(wdog_a && !wdog_b, "WDOG_B waits for end of GRST");
    #89us; @(posedge clk) grst <= 1'b0;
    #1us;
    check(wdog_a && wdog_b, "WDOG_B set after IOFF reset");
    on_pulses(9);
    check(wdog_b && b_count == 4'd9, $sformatf("9 pulses: still standby (count %0d)", b_count));
    on_pulses(1);
    check(!wdog_b, "released after 10th pulse");
    // Restart the count with GRST and LOAD_LL.
    @(posedge clk) ioff <= 1'b1; @(posedge clk) ioff <= 1'b0;
    do_grst();
    check(wdog_b, "standby again");
    on_pulses(5);
    do_grst();
    check(wdog_b && b_count == 4'd0, "GRST restarts count");
    on_pulses(7);
    @(posedge clk) load_ll <= 1'b1; #10us; @(posedge clk) load_ll <= 1'b0;
    check(b_count == 4'd0, "LOAD_LL restarts count");
    on_pulses(9);
    check(wdog_b, "not yet released");
    on_pulses(1);
    check(!wdog_b, "released");
    check(wdog_a, "WDOG_A still set until SFC");
    do_sfc();
    check(!wdog_a, "WDOG_A cleared");
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
