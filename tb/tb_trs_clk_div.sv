// tb_trs_clk_div: checks the clock-enable rates of the clock distribution.
// Over 20,000 master cycles (2 ms) there must be 10,000 S_CLK, 2,000 T_CLK and
// 20 R_CLK enables, each strictly periodic (2, 10 and 1000 cycles).
`timescale 1ns/1ps
module tb_trs_clk_div;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tick, t_tick, r_tick;
  int checks = 0, failures = 0;
  int ns = 0, nt = 0, nr = 0;
  longint cyc = 0, last_s = -1, last_t = -1, last_r = -1;
  int bad_s = 0, bad_t = 0, bad_r = 0;

  trs_clk_div dut (.m_clk(clk), .rst_n, .s_tick, .t_tick, .r_tick);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (s_tick) begin ns++; if (last_s >= 0 && cyc - last_s != 2)    bad_s++; last_s = cyc; end
    if (t_tick) begin nt++; if (last_t >= 0 && cyc - last_t != 10)   bad_t++; last_t = cyc; end
    if (r_tick) begin nr++; if (last_r >= 0 && cyc - last_r != 1000) bad_r++; last_r = cyc;
                      check(t_tick, "r_tick coincides with t_tick"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20000) @(posedge clk);
    #1;
    check(ns == 10000, $sformatf("s_tick count %0d", ns));
    check(nt == 2000,  $sformatf("t_tick count %0d", nt));
    check(nr == 20,    $sformatf("r_tick count %0d", nr));
    check(bad_s == 0 && bad_t == 0 && bad_r == 0, "tick spacing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
