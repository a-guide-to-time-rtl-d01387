// tb_trs_workloads: the controller at its default sizes on the largest
// superframe and window settings in normal use.
//  - 22-frame superframes (register 2172 = 21), the longest used in practice;
//  - the widest limit window: 12.6 us before to 12.9 us after the expected
//    pulse (2166 = 63 + 255*256, i.e. LIM[15:8] at its 8-bit maximum);
//  - a 1 ms field delay and a 400 ms field (2168 = 99, 2170 = 39999), which
//    spans most of the 440 ms superframe.
// Every source pulse is moved by a random amount within +-5 us. The window is
// placed from the first pulse of the superframe, so two pulses may differ by
// up to 10 us; the window must accept all of them. DAE pulses must come
// exactly 22 frames apart with no reset. Finally one pulse 20 us late must
// be rejected with GRST and VETO.
`timescale 1ns/1ps
module tb_trs_workloads;
  import trs_pkg::*;

  localparam realtime ISIS_PERIOD = 19999.8us;
  localparam logic [NUM_REGS-1:0] IDLE = 5'b0_1111;

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

  // Source with random jitter of up to +-5 us per pulse, or a forced shift.
  int      slot = 0;
  bit      jitter = 1'b1;
  realtime force_shift = 0;

  initial begin
    realtime sh, t0;
    #10us;
    forever begin
      t0 = $realtime;
      slot++;
      if (force_shift != 0) begin
        sh = force_shift; force_shift = 0;
      end else if (jitter) begin
        sh = (real'($urandom_range(100, 0)) - 50.0) * 0.1us;
      end else begin
        sh = 0;
      end
      #(50us + sh);
      isis = 1'b1; #400; isis = 1'b0;
      #(t0 + ISIS_PERIOD - $realtime);
    end
  end

  longint cyc = 0, t_dae = 0, t_efa = 0, efa_delay = 0, efa_len = 0;
  int n_dae = 0, n_grst = 0, n_veto = 0, n_efa = 0, last_dae_slot = 0;
  logic dae_d = 0, efa_d = 0, grst_d = 0, veto_d = 0;

  always @(posedge clk) begin
    cyc++;
    dae_d <= dae; efa_d <= efa; grst_d <= mon.grst; veto_d <= veto;
    if (dae && !dae_d) begin n_dae++; t_dae = cyc; last_dae_slot = slot; end
    if (efa && !efa_d) begin n_efa++; t_efa = cyc; efa_delay = cyc - t_dae; end
    if (!efa && efa_d) efa_len = cyc - t_efa;
    if (mon.grst && !grst_d) n_grst++;
    if (veto && !veto_d) n_veto++;
  end

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

  task automatic wait_dae(output int s);
    int n0;
    n0 = n_dae;
    wait (n_dae > n0);
    s = last_dae_slot;
  endtask

  initial begin
    int s0, s1;
    #325 rst_n = 1'b1;
    n_dae = 0; n_grst = 0; n_veto = 0; n_efa = 0;  // discard edges seen before reset
    run_dae = 1'b1;
    bus_write(REG_LIM, 16'd63 | (16'd255 << 8));
    bus_write(REG_DLY, 16'd99);
    bus_write(REG_LTH, 16'd39999);
    bus_write(REG_SFM, 16'd21);
    bus_write(REG_MUT, 16'd1024);
    wait_dae(s0);
    for (int i = 0; i < 2; i++) begin
      wait_dae(s1);
      check(s1 - s0 == 22, $sformatf("DAE %0d frames apart, want 22", s1 - s0));
      s0 = s1;
    end
    check(n_grst == 0 && n_veto == 0, $sformatf("jittered pulses accepted (grst=%0d)", n_grst));
    check(efa_delay >= 9996 && efa_delay <= 10006, $sformatf("EFA delay %0d cycles, want 10000", efa_delay));
    check(efa_len >= 3999996 && efa_len <= 4000004, $sformatf("EFA length %0d cycles, want 4000000", efa_len));
    check(n_efa >= 2, "field every superframe");
    // A pulse 20 us late, well inside the superframe, is outside the window.
    jitter = 1'b0;
    wait (slot == s1 + 5);
    #(ISIS_PERIOD - 100us);
    force_shift = 20us;
    wait (slot == s1 + 7);
    check(n_grst == 1 && n_veto == 1, $sformatf("late pulse rejected (grst=%0d veto=%0d)", n_grst, n_veto));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4s;
    failures++;
    $display("FAIL: watchdog timeout at slot %0d", slot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
