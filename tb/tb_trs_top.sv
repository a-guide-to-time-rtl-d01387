// tb_trs_top: end-to-end test of the TRS controller at its default sizes
// (10 MHz clock, 19999.8 us ISIS period, 30 ms source-failure timeout,
// 10-pulse standby, 10 us field steps).
//
// A behavioural ISIS source gives a 400 ns pulse every 19999.8 us; single
// pulses can be moved early or late, dropped, or the source stopped. The
// registers are written through the strobed register interface. Scenarios:
//  1. TRS overridden (register 2164 = 0): every pulse goes to the DAE.
//  2. Superframes of 4 frames (2172 = 3), window 5 us before and 20 us wide
//     (2166 = 25 + 100*256), field 2 ms after SFC for 10 ms (2168 = 199,
//     2170 = 999): DAE pulses exactly 4 frames apart, EFA timed from DAE.
//  3. Late and early pulses inside a superframe: VETO and GRST, then two
//     dummy superframes, so the next DAE pulse is 10 frames after the bad
//     one, with no field in between. A single missing pulse also trips the
//     30 ms source-failure timer, so standby follows (next DAE 20 frames on).
//  4. Source failure inside a superframe: window reset, IOFF after 30 ms,
//     standby (WDOG_B); after the source returns, 10 pulses release standby,
//     one preloads, two dummy superframes follow: first DAE at pulse 20.
//  5. Source failure just after a superframe completed: IOFF reset with no
//     VETO, same recovery.
//  6. Superperiod mode (2164 = 1088): every pulse to the DAE, F2P_RST on a
//     source-failure reset.
//  7. One-frame superframes (2164 = 33792): every pulse is DAE, SFC and EFA.
// Each mechanism is counted and a failure is counted for any that never
// happened.
`timescale 1ns/1ps
module tb_trs_top;
  import trs_pkg::*;

  localparam realtime ISIS_PERIOD = 19999.8us;
  localparam logic [NUM_REGS-1:0] IDLE = 5'b0_1111;  // SFM strobe is active high

  logic clk = 1'b0, rst_n = 1'b0;
  logic isis = 1'b0, run_dae = 1'b0;
  logic [NUM_REGS-1:0] write_pin = IDLE, read_pin = IDLE;
  logic [15:0] data_in = '0, data_out;
  logic data_oe, dae, veto, f2p_rst_n, efa;
  trs_mon_t mon;

  trs_top dut (.m_clk(clk), .rst_n, .isis, .run_dae, .write_pin, .read_pin,
               .data_in, .data_out, .data_oe, .dae, .veto, .f2p_rst_n, .efa, .mon);

  always #50 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- source
  bit      src_on = 1'b0;
  int      slot = 0;            // index of the current ISIS period
  realtime shift_next = 0;      // move the next pulse by this much
  bit      drop_next = 1'b0;    // leave the next pulse out

  initial begin
    realtime sh, t0;
    #10us;
    forever begin
      t0 = $realtime;
      slot++;
      sh = shift_next; shift_next = 0;
      if (src_on && !drop_next) begin
        #(50us + sh);
        isis = 1'b1; #400; isis = 1'b0;
      end
      drop_next = 1'b0;
      #(t0 + ISIS_PERIOD - $realtime);
    end
  end

  // ------------------------------------------------------------- monitors
  longint cyc = 0;
  int n_dae = 0, n_sfc = 0, n_pre = 0, n_load = 0, n_itp = 0, n_ifc = 0;
  int n_grst = 0, n_veto = 0, n_ioff = 0, n_wda = 0, n_wdb = 0, n_efa = 0;
  int n_stop = 0, n_f2p = 0;
  int last_dae_slot = -1;
  longint t_dae = 0, t_efa_rise = 0, t_efa_fall = 0;
  longint efa_delay = 0, efa_len = 0;
  trs_mon_t m_d;
  logic dae_d = 0, veto_d = 0, f2p_d = 1, efa_d = 0;

  always @(posedge clk) begin
    cyc++;
    m_d <= mon; dae_d <= dae; veto_d <= veto; f2p_d <= f2p_rst_n; efa_d <= efa;
    if (dae && !dae_d) begin n_dae++; last_dae_slot = slot; t_dae = cyc; end
    if (mon.sfc && !m_d.sfc) n_sfc++;
    if (mon.pre_sf && !m_d.pre_sf) n_pre++;
    if (mon.load_ll && !m_d.load_ll) n_load++;
    if (mon.itp && !m_d.itp) n_itp++;
    if (mon.ifc && !m_d.ifc) n_ifc++;
    if (mon.grst && !m_d.grst) n_grst++;
    if (mon.ioff) n_ioff++;
    if (mon.wdog_a && !m_d.wdog_a) n_wda++;
    if (mon.wdog_b && !m_d.wdog_b) n_wdb++;
    if (mon.stop_efa && !m_d.stop_efa) n_stop++;
    if (veto && !veto_d) n_veto++;
    if (!f2p_rst_n && f2p_d) n_f2p++;
    if (efa && !efa_d) begin n_efa++; t_efa_rise = cyc; efa_delay = cyc - t_dae; end
    if (!efa && efa_d) begin t_efa_fall = cyc; efa_len = cyc - t_efa_rise; end
  end

  // Mechanism tally for the final coverage check.
  typedef enum int {
    M_OVERRIDE, M_SUPERFRAME, M_FIELD, M_LATE, M_EARLY, M_MISSING,
    M_DUMMY, M_IOFF, M_STANDBY, M_NOVETO, M_SUPERPERIOD, M_F2P, M_ONEFRAME,
    M_READBACK, M_NUM
  } mech_e;
  int mech [M_NUM];

  // ------------------------------------------------------------ registers
  task automatic bus_write(input reg_idx_e idx, input logic [15:0] v);
    data_in = v;
    #100;
    write_pin[idx] = ~IDLE[idx];
    #400;
    write_pin[idx] = IDLE[idx];
    #100;
    data_in = '0;
    #500;
  endtask

  task automatic bus_read(input reg_idx_e idx, output logic [15:0] v);
    read_pin[idx] = ~IDLE[idx];
    #350;
    v = data_out;
    #50;
    read_pin[idx] = IDLE[idx];
    #600;
  endtask

  // ------------------------------------------------------------- helpers
  task automatic wait_slots(input int k);
    int s0;
    s0 = slot;
    wait (slot >= s0 + k);
  endtask

  task automatic wait_dae(output int s);
    int n0;
    n0 = n_dae;
    wait (n_dae > n0);
    s = last_dae_slot;
  endtask

  // Count DAE pulses over m superframes of n frames; all must be n apart.
  task automatic steady(input int n, input int m, input string what);
    int s0, s1;
    wait_dae(s0);
    for (int i = 0; i < m; i++) begin
      wait_dae(s1);
      check(s1 - s0 == n, $sformatf("%s: DAE %0d frames apart, want %0d", what, s1 - s0, n));
      s0 = s1;
    end
  endtask

  // One bad pulse two frames into a superframe; recovery is checked.
  task automatic bad_pulse(input int kind, input string what);
    int s0, bad, snext, g0, v0, e0, want, resets;
    // A late or early pulse costs the rest of the superframe plus two dummy
    // superframes and a preload frame: the next DAE pulse is 10 frames on.
    // A missing pulse leaves 40 ms without ISIS, so the 30 ms source-failure
    // timer also fires and standby adds the 10 release pulses.
    want   = (kind == 2) ? 20 : 10;
    resets = (kind == 2) ? 2 : 1;
    wait_dae(s0);
    wait_slots(1);          // now inside slot s0 + 1
    #(ISIS_PERIOD - 100us); // just before slot s0 + 2
    bad = slot + 1;
    case (kind)
      0: shift_next = 30us;
      1: shift_next = -30us;
      default: drop_next = 1'b1;
    endcase
    g0 = n_grst; v0 = n_veto; e0 = n_efa;
    wait_dae(snext);
    check(snext - bad == want, $sformatf("%s: next DAE %0d frames after bad pulse, want %0d",
                                         what, snext - bad, want));
    check(n_grst - g0 == resets && n_veto - v0 == resets,
          $sformatf("%s: grst=%0d veto=%0d", what, n_grst - g0, n_veto - v0));
    check(n_efa == e0, $sformatf("%s: no field during recovery", what));
    if (snext - bad == want && n_veto - v0 == resets) begin
      mech[kind == 0 ? M_LATE : kind == 1 ? M_EARLY : M_MISSING]++;
      mech[M_DUMMY]++;
    end
  endtask

  // Stop the source for `off` periods starting at the next slot; return the
  // first slot after it comes back.
  task automatic outage(input int off, output int back);
    src_on = 1'b0;
    wait_slots(off);
    back = slot + 1;
    src_on = 1'b1;
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    int s, back, g0, v0, i0, d0, b0, f0, sfc0, e0;
    logic [15:0] rv;
    foreach (mech[i]) mech[i] = 0;
    #325 rst_n = 1'b1;
    // discard edges seen before reset
    n_dae = 0; n_sfc = 0; n_pre = 0; n_load = 0; n_itp = 0; n_ifc = 0; n_grst = 0;
    n_veto = 0; n_ioff = 0; n_wda = 0; n_wdb = 0; n_efa = 0; n_stop = 0; n_f2p = 0;
    run_dae = 1'b1;
    src_on  = 1'b1;

    // 1. Override.
    wait_slots(1);
    d0 = n_dae;
    wait_slots(4);
    check(n_dae - d0 == 4, $sformatf("override: %0d DAE pulses in 4 frames", n_dae - d0));
    check(n_sfc == 0 && n_itp == 0, "override: TRS idle");
    if (n_dae - d0 == 4) mech[M_OVERRIDE]++;

    // 2. Superframes.
    bus_write(REG_LIM, 16'd25 | (16'd100 << 8));
    bus_write(REG_DLY, 16'd199);
    bus_write(REG_LTH, 16'd999);
    bus_write(REG_SFM, 16'd3);
    bus_write(REG_MUT, 16'd1024);
    bus_read(REG_LIM, rv);
    check(rv == 16'h6419, $sformatf("read back LIM %h", rv));
    bus_read(REG_MUT, rv);
    check(rv == 16'd1024, $sformatf("read back MUT %h", rv));
    if (rv == 16'd1024) mech[M_READBACK]++;
    steady(4, 3, "superframe");
    check(n_grst == 0 && n_veto == 0, "no reset in normal running");
    check(efa_delay >= 19998 && efa_delay <= 20006,
          $sformatf("EFA %0d cycles after DAE, want 20000", efa_delay));
    wait (!efa);
    check(efa_len >= 99996 && efa_len <= 100004,
          $sformatf("EFA lasts %0d cycles, want 100000", efa_len));
    check(n_stop > 0, "STOP_EFA seen");
    if (n_dae > 4 && n_pre > 2) mech[M_SUPERFRAME]++;
    if (n_efa > 2 && efa_delay >= 19998 && efa_delay <= 20006) mech[M_FIELD]++;
    check(n_wda == 0 && n_wdb == 0, "watchdogs quiet");

    // 3. Window failures.
    bad_pulse(0, "late pulse");
    bad_pulse(1, "early pulse");
    bad_pulse(2, "missing pulse");
    steady(4, 2, "after window failures");

    // 4. Source failure inside a superframe.
    wait_dae(s);
    wait_slots(1);
    #(ISIS_PERIOD - 100us);
    g0 = n_grst; v0 = n_veto; i0 = n_ioff; b0 = n_wdb; e0 = n_efa;
    outage(5, back);
    wait_dae(s);
    check(n_ioff - i0 == 1, $sformatf("one IOFF (%0d)", n_ioff - i0));
    check(n_grst - g0 == 2 && n_veto - v0 == 2,
          $sformatf("window reset then IOFF reset: grst=%0d veto=%0d", n_grst - g0, n_veto - v0));
    check(n_wdb - b0 == 1, "standby entered");
    check(s - back == 19, $sformatf("source failure: first DAE at returned pulse %0d, want 20", s - back + 1));
    check(n_efa == e0, "no field while recovering");
    if (n_ioff - i0 == 1) mech[M_IOFF]++;
    if (s - back == 19 && n_wdb - b0 == 1) mech[M_STANDBY]++;
    steady(4, 1, "after source failure");

    // 5. Source failure right after PRE_SF.
    wait_dae(s);
    wait_slots(3);            // start of the last frame of this superframe
    #200us;                   // past its pulse and PRE_SF
    check(mon.wdog_a == 1'b0 && n_pre > 0, "superframe complete");
    g0 = n_grst; v0 = n_veto; i0 = n_ioff;
    outage(4, back);
    wait_dae(s);
    check(n_grst - g0 == 1 && n_veto == v0 && n_ioff - i0 == 1,
          $sformatf("failure between superframes: grst=%0d veto=%0d ioff=%0d",
                    n_grst - g0, n_veto - v0, n_ioff - i0));
    check(s - back == 19, $sformatf("between superframes: first DAE at returned pulse %0d, want 20", s - back + 1));
    if (n_grst - g0 == 1 && n_veto == v0) mech[M_NOVETO]++;

    // 6. Superperiod mode.
    bus_write(REG_MUT, 16'd1088);
    wait_slots(6);
    d0 = n_dae; sfc0 = n_sfc;
    wait_slots(8);
    check(n_dae - d0 == 8, $sformatf("superperiod: %0d DAE in 8 frames", n_dae - d0));
    check(n_sfc - sfc0 == 2, $sformatf("superperiod: %0d cycle starts in 8 frames", n_sfc - sfc0));
    if (n_dae - d0 == 8 && n_sfc - sfc0 == 2) mech[M_SUPERPERIOD]++;
    f0 = n_f2p;
    outage(4, back);
    wait_slots(25);
    check(n_f2p - f0 == 1, $sformatf("F2P_RST on source failure (%0d)", n_f2p - f0));
    check(mon.wdog_a == 1'b0 && mon.wdog_b == 1'b0, "superperiod: recovered");
    d0 = n_dae;
    wait_slots(4);
    check(n_dae - d0 == 4, "superperiod: DAE pulses resume");
    if (n_f2p - f0 == 1) mech[M_F2P]++;

    // 7. One-frame superframes.
    bus_write(REG_MUT, 16'd33792);
    wait_slots(1);
    d0 = n_dae; sfc0 = n_sfc; e0 = n_efa;
    wait_slots(5);
    check(n_dae - d0 == 5 && n_sfc - sfc0 == 5 && n_efa - e0 == 5,
          $sformatf("one-frame: dae=%0d sfc=%0d efa=%0d", n_dae - d0, n_sfc - sfc0, n_efa - e0));
    if (n_dae - d0 == 5 && n_efa - e0 == 5) mech[M_ONEFRAME]++;

    // Coverage.
    check(n_load > 0 && n_itp > 0 && n_ifc > 0 && n_stop > 0 && n_wda > 0,
          "internal mechanisms seen");
    for (int i = 0; i < M_NUM; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("counts: dae=%0d sfc=%0d pre_sf=%0d load_ll=%0d itp=%0d ifc=%0d grst=%0d veto=%0d ioff=%0d wdog_a=%0d wdog_b=%0d efa=%0d f2p=%0d",
             n_dae, n_sfc, n_pre, n_load, n_itp, n_ifc, n_grst, n_veto, n_ioff, n_wda, n_wdb, n_efa, n_f2p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #6s;
    failures++;
    $display("FAIL: watchdog timeout at slot %0d", slot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
