// tb_trs_limit_gen: checks the limit generator at full size.
//  - after LOAD_LL with LIM[7:0] = P, the first LL comes (99999 - P) S_CLK
//    periods after the load ends, then every 99999 S_CLK periods
//    (199998 m_clk cycles = 19999.8 us);
//  - LL lasts 100 us, UL lasts 150 us and rises LIM[15:8] x 0.1 us after LL;
//  - with the enable low the counter holds and no LL is produced.
// Several random LIM values are tried. Tolerances allow for the 1 us phase
// of the T_CLK-based pulse widths.
`timescale 1ns/1ps
module tb_trs_limit_gen;
  import trs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tick, t_tick, r_tick;
  logic l_clk_en = 0, load_ll = 0;
  logic [15:0] lim;
  logic ll, ul, cycle_mon;
  int checks = 0, failures = 0;
  longint cyc = 0, t_load_end = 0, t_ll_rise = 0, t_ll_fall = 0, t_ul_rise = 0, t_ul_fall = 0;
  longint t_prev_ll = 0;
  int n_ll = 0;
  logic ll_d = 0, ul_d = 0, load_d = 0;

  trs_clk_div u_clk (.m_clk(clk), .rst_n, .s_tick, .t_tick, .r_tick);
  trs_limit_gen dut (.m_clk(clk), .rst_n, .s_tick, .t_tick, .l_clk_en, .load_ll,
                     .lim, .ll, .ul, .cycle_mon);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    ll_d <= ll; ul_d <= ul; load_d <= load_ll;
    if (!load_ll && load_d) t_load_end = cyc;
    if (ll && !ll_d) begin n_ll++; t_prev_ll = t_ll_rise; t_ll_rise = cyc; end
    if (!ll && ll_d) t_ll_fall = cyc;
    if (ul && !ul_d) t_ul_rise = cyc;
    if (!ul && ul_d) t_ul_fall = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input longint v, input longint want, input longint tol);
    return (v >= want - tol) && (v <= want + tol);
  endfunction

  initial begin
    int p, u;
    longint d;
    lim = '0;
    #325 rst_n = 1'b1;
    n_ll = 0;  // discard edges seen before reset
    for (int trial = 0; trial < 4; trial++) begin
      p = (trial == 0) ? 25 : int'($urandom_range(128, 0));
      u = (trial == 0) ? 100 : int'($urandom_range(255, 1));
      lim = 16'(p) | (16'(u) << 8);
      n_ll = 0;
      l_clk_en = 1'b1;
      load_ll = 1'b1; #10us; load_ll = 1'b0;
      wait (n_ll == 1);
      #1us;
      d = t_ll_rise - t_load_end;
      check(near(d, 2 * (99999 - p), 3),
            $sformatf("P=%0d first LL after %0d cycles, want %0d", p, d, 2 * (99999 - p)));
      wait (ul);
      wait (!ul);
      #1us;
      check(near(t_ll_fall - t_ll_rise, 1000, 10), $sformatf("LL width %0d", t_ll_fall - t_ll_rise));
      check(near(t_ul_fall - t_ul_rise, 1500, 10), $sformatf("UL width %0d", t_ul_fall - t_ul_rise));
      check(near(t_ul_rise - t_ll_rise, u, 1),
            $sformatf("U=%0d UL delay %0d cycles", u, t_ul_rise - t_ll_rise));
      wait (n_ll == 3);
      #1us;
      check(t_ll_rise - t_prev_ll == 199998, $sformatf("LL period %0d", t_ll_rise - t_prev_ll));
      // Stop the clock: no more LL.
      l_clk_en = 1'b0;
      #45ms;
      check(n_ll == 3 && !ll && !ul, "no LL while clock disabled");
      check(cycle_mon == ll, "monitor follows LL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2s;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
