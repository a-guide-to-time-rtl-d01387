// trs_superframe_reg: superframe register of the TRS logic.
//
// It forms superframes by letting the first ISIS pulse of each superframe out
// to the DAE and blocking the following ones. A "gate open" flag (5FF.C5 in
// the original) lets one ISIS_INT through as SFC (superframe start, which also
// triggers the external field) and, unless WDOG_A is high, as the DAE pulse;
// 4 us after SFC the gate closes. The register then counts IFC pulses (ISIS
// pulses that passed the limit check) or, with the limit window off
// (DATA_LO), the ISIS_INT pulses themselves. When the count reaches register
// 2172 (superframe length minus one) a 10 us PRE_SF pulse clears the count,
// stops the limit generator and comparator, and its trailing edge opens the
// gate for the first pulse of the next superframe.
//
// After GRST the count and the gate are cleared, so the next superframe is
// built without a DAE or SFC pulse (first dummy superframe). Its PRE_SF opens
// the gate; the following SFC is blocked from the DAE by WDOG_A and only
// releases the watchdog (second dummy superframe). Proper superframes follow.
//
// Other modes: DATA_SM passes every ISIS_INT as SFC and DAE (one-frame
// superframes, no counting). DATA_SR (superperiod) sends every ISIS_INT to the
// DAE while the count still times SFC, and turns GRST into the active-low
// F2P_RST that resets the DAE period counter. With DATA_MO low the TRS is
// bypassed and ISIS_ON goes straight to the DAE.
//
// Timing: dae and sfc are combinational copies of the ISIS_INT level; PRE_SF
// starts 1 cycle after the counting edge. Gate, counter, compare and pulse
// lengths follow the document; using the increment to detect equality (so a
// register value of 0 never retriggers) is this design's choice.
module trs_superframe_reg
  import trs_pkg::*;
(
  input  logic        m_clk,
  input  logic        rst_n,
  input  logic        t_tick,
  input  logic        isis_on,
  input  logic        isis_int,
  input  logic        ifc,
  input  logic        grst,
  input  logic        wdog_a,
  input  trs_ctrl_t   ctrl,
  input  logic [15:0] reg_sfm,
  output logic        dae,
  output logic        sfc,
  output logic        pre_sf,
  output logic        f2p_rst_n,
  output logic [15:0] frame_count
);
  logic gate_ff, ifc_d, int_d, sfc_d, pre_d, close, close_d;
  logic inc, pre_start, sfc_rise;
  logic [15:0] cnt;

  assign sfc       = isis_int & (gate_ff | ctrl.sm);
  assign sfc_rise  = sfc & ~sfc_d;
  assign inc       = (ifc & ~ifc_d) |
                     (isis_int & ~int_d & ctrl.lo & ~gate_ff & ~ctrl.sm);
  assign pre_start = inc & ~ctrl.sm & (cnt + 16'd1 == reg_sfm);

  trs_pulse_stretch #(.WIDTH(PRESF_WIDTH_T)) u_pre (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(pre_start), .clear(grst), .q(pre_sf)
  );
  trs_pulse_stretch #(.WIDTH(GATE_CLOSE_T)) u_close (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(sfc_rise), .clear(1'b0), .q(close)
  );

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_ff <= 1'b0;
      ifc_d   <= 1'b0;
      int_d   <= 1'b0;
      sfc_d   <= 1'b0;
      pre_d   <= 1'b0;
      close_d <= 1'b0;
      cnt     <= '0;
    end else begin
      ifc_d   <= ifc;
      int_d   <= isis_int;
      sfc_d   <= sfc;
      pre_d   <= pre_sf;
      close_d <= close;
      if (grst || (close_d && !close)) gate_ff <= 1'b0;
      else if (pre_d && !pre_sf)      gate_ff <= 1'b1;
      if (grst || pre_sf) cnt <= '0;
      else if (inc)       cnt <= cnt + 16'd1;
    end
  end

  assign dae = (sfc & ~wdog_a & ~ctrl.sr & ctrl.mo) |
               (isis_int & ~wdog_a & ctrl.sr) |
               (isis_on & ~ctrl.mo);
  assign f2p_rst_n   = ~(grst & ctrl.sr);
  assign frame_count = cnt;
endmodule
