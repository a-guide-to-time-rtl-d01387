// trs_sys_ctrl: system control of the TRS logic.
//
// The ISIS master pulse (400 ns, 50 Hz) enters here. It is gated by RUN_DAE
// and the DATA_IS test bit into ISIS_ON, and by DATA_MO (TRS enabled) and
// WDOG_B (standby after a source failure) into ISIS_INT. ISIS_INT feeds the
// superframe register directly and becomes ITP for the comparator:
//   * the first ISIS_INT after a reset only arms this block and fires LOAD_LL,
//     a 10 us pulse that preloads the limit generator;
//   * every later ISIS_INT is passed on as ITP and (re)starts the limit
//     generator clock (l_clk_en) until PRE_SF marks the end of the superframe,
//     when LOAD_LL fires again for the next superframe.
// GRST disarms the block, so the next pulse again only preloads. ITP is not
// produced for one-frame superframes (DATA_SM) or with the limit window off
// (DATA_LO).
//
// Source-failure timer: a 10 kHz counter is cleared by every ISIS_ON and,
// once it reaches IOFF_COUNT (300 = 30 ms), gives a one-cycle IOFF strobe and
// holds. It runs while the block is armed or a watchdog signal is active.
//
// Timing: ISIS and RUN_DAE pass a two-stage synchroniser, so ISIS_ON, ISIS_INT
// and ITP follow the pin by 2 cycles (200 ns) with the pin's width. The
// structure (gates, the arming and run flip-flops, the 300-count timer) is the
// document's; the synchronisers and the strobe form of IOFF are this design's.
module trs_sys_ctrl
  import trs_pkg::*;
#(
  parameter int unsigned IOFF_COUNT = IOFF_COUNT_DEF
) (
  input  logic      m_clk,
  input  logic      rst_n,
  input  logic      t_tick,
  input  logic      r_tick,
  input  logic      isis,      // ISIS master pulse pin
  input  logic      run_dae,   // instrument running
  input  trs_ctrl_t ctrl,
  input  logic      wdog_a,
  input  logic      wdog_b,
  input  logic      grst,
  input  logic      pre_sf,
  output logic      isis_on,
  output logic      isis_int,
  output logic      itp,
  output logic      load_ll,
  output logic      l_clk_en,  // limit generator may count S_CLK
  output logic      ioff       // one-cycle strobe: 30 ms without ISIS
);
  logic isis_s1, isis_s2, run_s1, run_s2;
  logic int_d, pre_sf_d;
  logic armed;    // 2FF.C6 of the original
  logic running;  // 2FF.C5 of the original
  logic itp_path;
  logic int_rise, int_fall, load_start;
  logic [$clog2(IOFF_COUNT+1)-1:0] rcnt;

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      isis_s1 <= 1'b0; isis_s2 <= 1'b0;
      run_s1  <= 1'b0; run_s2  <= 1'b0;
    end else begin
      isis_s1 <= isis;    isis_s2 <= isis_s1;
      run_s1  <= run_dae; run_s2  <= run_s1;
    end
  end

  assign isis_on  = isis_s2 & run_s2 & ~ctrl.is;
  assign isis_int = isis_on & ctrl.mo & ~wdog_b;
  assign itp_path = ~ctrl.sm & ~ctrl.lo;
  assign itp      = isis_int & itp_path & armed;

  assign int_rise   = isis_int & ~int_d;
  assign int_fall   = ~isis_int & int_d;
  assign load_start = (int_rise & itp_path & ~armed) | (pre_sf & ~pre_sf_d & ~ctrl.lo);

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      int_d    <= 1'b0;
      pre_sf_d <= 1'b0;
      armed    <= 1'b0;
      running  <= 1'b0;
    end else begin
      int_d    <= isis_int;
      pre_sf_d <= pre_sf;
      if (grst)          armed <= 1'b0;
      else if (int_fall) armed <= 1'b1;
      if (grst || pre_sf)                     running <= 1'b0;
      else if (int_rise && armed && itp_path) running <= 1'b1;
    end
  end

  trs_pulse_stretch #(.WIDTH(LOADLL_WIDTH_T)) u_load (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(load_start), .clear(1'b0), .q(load_ll)
  );

  assign l_clk_en = running | load_ll | ctrl.ln;

  // ISIS loss timer (2CT.A3 / 2CP.B3).
  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt <= '0;
      ioff <= 1'b0;
    end else begin
      ioff <= 1'b0;
      if (isis_on) begin
        rcnt <= '0;
      end else if (r_tick && (armed || wdog_a || wdog_b) &&
                   rcnt != $bits(rcnt)'(IOFF_COUNT)) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == $bits(rcnt)'(IOFF_COUNT - 1)) ioff <= 1'b1;
      end
    end
  end
endmodule
