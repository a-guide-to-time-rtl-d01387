// tb_trs_comparator: checks the ISIS period comparator.
// LL (100 us), UL (150 us, 10 us after LL) and ITP (0.4 us) are driven
// directly. Cases:
//  - the first ITP only switches the comparator on (no IFC);
//  - an ITP inside the window gives IFC, which ends 90 us after LL falls,
//    with no GRST;
//  - early, late and missing ITPs give GRST and VETO (90 us) and switch the
//    comparator off, so a following window without ITP does nothing;
//  - PRE_SF switches it off and suppresses VETO for a following IOFF until
//    the next SFC; IOFF with no PRE_SF gives GRST and VETO.
`timescale 1ns/1ps
module tb_trs_comparator;
  import trs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_tick, t_tick, r_tick;
  logic itp = 0, ll = 0, ul = 0, pre_sf = 0, sfc = 0, ioff = 0;
  logic ifc, grst, veto;
  int checks = 0, failures = 0;
  int n_ifc = 0, n_grst = 0, n_veto = 0;
  longint cyc = 0, t_ll_fall = 0, t_ifc_fall = 0, t_grst_rise = 0, t_grst_fall = 0;
  logic ifc_d = 0, grst_d = 0, veto_d = 0, ll_d = 0;

  trs_clk_div u_clk (.m_clk(clk), .rst_n, .s_tick, .t_tick, .r_tick);
  trs_comparator dut (.m_clk(clk), .rst_n, .t_tick, .itp, .ll, .ul, .pre_sf,
                      .sfc, .ioff, .ifc, .grst, .veto);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    ifc_d <= ifc; grst_d <= grst; veto_d <= veto; ll_d <= ll;
    if (!ll && ll_d) t_ll_fall = cyc;
    if (ifc && !ifc_d) n_ifc++;
    if (!ifc && ifc_d) t_ifc_fall = cyc;
    if (grst && !grst_d) begin n_grst++; t_grst_rise = cyc; end
    if (!grst && grst_d) t_grst_fall = cyc;
    if (veto && !veto_d) n_veto++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic itp_pulse();
    itp = 1'b1; #400; itp = 1'b0;
  endtask

  // One limit window; the ITP arrives at offset us after LL rises
  // (negative = before LL); offset >= 1000 means no ITP.
  task automatic window(input int offset_us);
    fork
      begin
        #20us;
        ll = 1'b1;
        #10us ul = 1'b1;
        #90us ll = 1'b0;
        #60us ul = 1'b0;
      end
      begin
        if (offset_us < 1000) begin
          #((20 + offset_us) * 1us);
          itp_pulse();
        end
      end
    join
    #200us;
  endtask

  task automatic counts(input int e_ifc, input int e_grst, input int e_veto, input string what);
    check(n_ifc == e_ifc && n_grst == e_grst && n_veto == e_veto,
          $sformatf("%s: ifc=%0d grst=%0d veto=%0d want %0d %0d %0d",
                    what, n_ifc, n_grst, n_veto, e_ifc, e_grst, e_veto));
    n_ifc = 0; n_grst = 0; n_veto = 0;
  endtask

  initial begin
    #325 rst_n = 1'b1;
    n_ifc = 0; n_grst = 0; n_veto = 0;  // discard edges seen before reset
    #1us;
    // Off: a window without ITP does nothing.
    window(5000); counts(0, 0, 0, "off, no ITP");
    itp_pulse(); #10us;
    counts(0, 0, 0, "first ITP only arms");
    for (int i = 0; i < 3; i++) begin
      int off;
      off = int'($urandom_range(9, 1));
      window(off);
      counts(1, 0, 0, $sformatf("ITP in window at +%0d us", off));
      check(t_ifc_fall - t_ll_fall >= 895 && t_ifc_fall - t_ll_fall <= 915,
            $sformatf("IFC ends 90 us after LL (%0d)", t_ifc_fall - t_ll_fall));
    end
    // Early ITP.
    window(-3); counts(0, 1, 1, "early ITP fails");
    check(t_grst_fall - t_grst_rise >= 895 && t_grst_fall - t_grst_rise <= 915,
          $sformatf("GRST lasts 90 us (%0d)", t_grst_fall - t_grst_rise));
    check(t_grst_rise - t_ll_fall <= 2, "GRST at end of LL");
    window(5000); counts(0, 0, 0, "off after fail");
    // Late ITP.
    itp_pulse(); #10us;
    window(5); counts(1, 0, 0, "pass");
    window(15); counts(0, 1, 1, "late ITP fails");
    // Missing ITP.
    itp_pulse(); #10us;
    window(5000); counts(0, 1, 1, "missing ITP fails");
    // PRE_SF ends the superframe: off, and IOFF does not veto.
    itp_pulse(); #10us;
    window(2); counts(1, 0, 0, "pass before PRE_SF");
    @(posedge clk) pre_sf <= 1'b1;
    #10us; @(posedge clk) pre_sf <= 1'b0;
    window(5000); counts(0, 0, 0, "off after PRE_SF");
    @(posedge clk) ioff <= 1'b1; @(posedge clk) ioff <= 1'b0;
    #200us; counts(0, 1, 0, "IOFF after complete superframe: GRST only");
    @(posedge clk) sfc <= 1'b1; #400; @(posedge clk) sfc <= 1'b0;
    #10us;
    @(posedge clk) ioff <= 1'b1; @(posedge clk) ioff <= 1'b0;
    #200us; counts(0, 1, 1, "IOFF during superframe: GRST and VETO");
    check(!grst && !veto && !ifc, "outputs idle");
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
