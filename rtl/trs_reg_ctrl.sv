// trs_reg_ctrl: register control of the TRS logic.
//
// Five 16-bit data registers are written and read by the instrument computer
// over the DAE data bus. Each register has its own write and read strobe from
// the DAE address decoder: 2164 (MUT, control bits), 2166 (LIM, limit window),
// 2168 (DLY, EFA delay), 2170 (LTH, EFA length) and 2172 (SFM, superframe
// length minus one). The strobes of MUT, LIM, DLY and LTH are active low and
// those of SFM active high, as on the original board. A register takes the bus
// value on the trailing edge of its write strobe (a ~400 ns pulse); while a
// read strobe is active the selected register is driven back on the bus.
// Register 2164 is decoded into the DATA_* control lines; DATA_LO is also
// forced by DATA_SR, since superperiod mode never uses the limit window.
//
// Interface: the bidirectional bus of the original is split into data_in,
// data_out and data_oe (enable for an external bidirectional buffer). The
// strobes and bus are asynchronous to m_clk and pass through two-stage
// synchronisers; the register updates 3 cycles after the strobe ends. Reset
// clears all registers, which leaves the TRS in master override (pulses pass
// straight through). Synchronisers and reset values are this design's choice.
module trs_reg_ctrl
  import trs_pkg::*;
(
  input  logic                 m_clk,
  input  logic                 rst_n,
  input  logic [NUM_REGS-1:0]  write_pin,  // raw strobes, index reg_idx_e
  input  logic [NUM_REGS-1:0]  read_pin,   // raw strobes, index reg_idx_e
  input  logic [15:0]          data_in,
  output logic [15:0]          data_out,
  output logic                 data_oe,
  output logic [15:0]          reg_mut,
  output logic [15:0]          reg_lim,
  output logic [15:0]          reg_dly,
  output logic [15:0]          reg_lth,
  output logic [15:0]          reg_sfm,
  output trs_ctrl_t            ctrl
);
  // Active-high polarity mask: only SFM strobes are active high on the pins.
  localparam logic [NUM_REGS-1:0] ACT_HIGH = NUM_REGS'(1) << REG_SFM;

  logic [NUM_REGS-1:0] wr_s1, wr_s2, wr_s3, rd_s1, rd_s2;
  logic [15:0]         d_s1, d_s2;
  logic [15:0]         regs [NUM_REGS];

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_s1 <= '0; wr_s2 <= '0; wr_s3 <= '0;
      rd_s1 <= '0; rd_s2 <= '0;
      d_s1  <= '0; d_s2  <= '0;
    end else begin
      wr_s1 <= write_pin ^ ~ACT_HIGH;  // now active high
      wr_s2 <= wr_s1;
      wr_s3 <= wr_s2;
      rd_s1 <= read_pin ^ ~ACT_HIGH;
      rd_s2 <= rd_s1;
      d_s1  <= data_in;
      // hold the last value seen while a write strobe is active
      if (|wr_s1) d_s2 <= d_s1;
    end
  end

  // Load on the trailing edge of the (synchronised) write strobe.
  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_REGS; i++)
        if (wr_s3[i] && !wr_s2[i]) regs[i] <= d_s2;
    end
  end

  // Read back: tri-state buffers of the original become a multiplexer.
  always_comb begin
    data_out = '0;
    for (int i = 0; i < NUM_REGS; i++)
      if (rd_s2[i]) data_out = data_out | regs[i];
    data_oe = |rd_s2;
  end

  assign reg_mut = regs[REG_MUT];
  assign reg_lim = regs[REG_LIM];
  assign reg_dly = regs[REG_DLY];
  assign reg_lth = regs[REG_LTH];
  assign reg_sfm = regs[REG_SFM];

  always_comb begin
    ctrl.sr  = reg_mut[BIT_SR];
    ctrl.rn  = reg_mut[BIT_RN];
    ctrl.ln  = reg_mut[BIT_LN];
    ctrl.fa  = reg_mut[BIT_FA];
    ctrl.mo  = reg_mut[BIT_MO];
    ctrl.is  = reg_mut[BIT_IS];
    ctrl.do_ = reg_mut[BIT_DO];
    ctrl.eo  = reg_mut[BIT_EO];
    ctrl.lo  = reg_mut[BIT_LO] | reg_mut[BIT_SR];
    ctrl.sm  = reg_mut[BIT_SM];
  end
endmodule
