// tb_trs_reg_ctrl: writes and reads back the five TRS registers through their
// strobes (active low except SFM, active high) and checks the decode of the
// control register 2164, including DATA_LO forced by DATA_SR.
`timescale 1ns/1ps
module tb_trs_reg_ctrl;
  import trs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_REGS-1:0] write_pin, read_pin;
  logic [15:0] data_in, data_out;
  logic data_oe;
  logic [15:0] reg_mut, reg_lim, reg_dly, reg_lth, reg_sfm;
  trs_ctrl_t ctrl;
  int checks = 0, failures = 0;
  logic [15:0] model [NUM_REGS];
  localparam logic [NUM_REGS-1:0] IDLE = 5'b0_1111; // SFM idle low, others idle high

  trs_reg_ctrl dut (.m_clk(clk), .rst_n, .write_pin, .read_pin, .data_in,
                    .data_out, .data_oe, .reg_mut, .reg_lim, .reg_dly,
                    .reg_lth, .reg_sfm, .ctrl);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 400 ns strobe, data valid 100 ns before to 100 ns after.
  task automatic bus_write(input int idx, input logic [15:0] v);
    data_in = v;
    #100;
    write_pin[idx] = ~IDLE[idx];
    #400;
    write_pin[idx] = IDLE[idx];
    #100;
    data_in = $urandom;
    #500;
    model[idx] = v;
  endtask

  task automatic bus_read(input int idx, output logic [15:0] v, output logic oe);
    read_pin[idx] = ~IDLE[idx];
    #350;
    v  = data_out;
    oe = data_oe;
    #50;
    read_pin[idx] = IDLE[idx];
    #600;
  endtask

  function automatic logic [15:0] reg_of(input int idx);
    case (idx)
      REG_MUT: return reg_mut;
      REG_LIM: return reg_lim;
      REG_DLY: return reg_dly;
      REG_LTH: return reg_lth;
      default: return reg_sfm;
    endcase
  endfunction

  initial begin
    logic [15:0] v;
    logic oe;
    write_pin = IDLE;
    read_pin  = IDLE;
    data_in   = '0;
    for (int i = 0; i < NUM_REGS; i++) model[i] = '0;
    #325 rst_n = 1'b1;
    #1000;
    for (int i = 0; i < NUM_REGS; i++) check(reg_of(i) == 16'd0, "reset value");
    check(!data_oe, "bus not driven when idle");
    for (int round = 0; round < 6; round++) begin
      for (int i = 0; i < NUM_REGS; i++) bus_write(i, 16'($urandom));
      for (int i = 0; i < NUM_REGS; i++) begin
        check(reg_of(i) == model[i], $sformatf("reg %0d = %h want %h", i, reg_of(i), model[i]));
        bus_read(i, v, oe);
        check(oe && v == model[i], $sformatf("readback %0d = %h want %h", i, v, model[i]));
      end
    end
    // Holding SFM's strobe low (its idle level) must not write it.
    data_in = 16'h1234;
    #2000;
    check(reg_sfm == model[REG_SFM], "idle SFM strobe does not write");
    // Control decode.
    bus_write(REG_MUT, 16'd1024 + 16'd64);
    check(ctrl.mo && ctrl.sr && ctrl.lo && !ctrl.sm && !ctrl.fa, "superperiod decode");
    bus_write(REG_MUT, 16'd33793);
    check(ctrl.mo && ctrl.sm && !ctrl.sr && !ctrl.lo, "one-frame superframe decode");
    bus_write(REG_MUT, 16'd1024 + 16'd4096 + 16'd8192 + 16'd16384 + 16'd512 + 16'd128 + 16'd256 + 16'd2048);
    check(ctrl.do_ && ctrl.eo && ctrl.lo && ctrl.fa && ctrl.rn && ctrl.ln && ctrl.is && !ctrl.sr,
          "option bits decode");
    bus_write(REG_MUT, 16'd0);
    check(ctrl == '0, "override decode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
