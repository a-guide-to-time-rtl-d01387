// trs_efc: external field control of the TRS logic.
//
// Produces EFA, the trigger for the external (high voltage) field, a
// programmed delay after each SFC (superframe start) and for a programmed
// length. Both are counted in steps of STEP S_CLK periods (50 x 0.2 us =
// 10 us): a prescaler counts S_CLK 1..STEP and advances a 17-bit step
// counter. The delay counter stops when it exceeds register 2168 (DLY), so
// the delay is (DLY+1) x 10 us; then START_UL rises and the length counter
// runs until it exceeds register 2170 (LTH), so EFA lasts (LTH+1) x 10 us.
// STOP_EFA then ends START_UL and is held for 10 us.
//
// An SFC starts the delay only if WDOG_A is low, DLY and LTH are both
// non-zero, DATA_MO is high and DATA_EO is low. DATA_DO skips the delay.
// Once started, the sequence always completes; WDOG_A only masks the output:
//   efa = (RUN_DAE | DATA_RN) & ((START_UL & ~WDOG_A) | DATA_FA)
// so DATA_FA gives a permanent field while the run is on, and DATA_RN lets
// the field on outside a run.
//
// Timing: the delay is measured from the SFC rising edge (after the ISIS
// synchroniser) to EFA rising, to within one S_CLK period plus 2 cycles.
// RUN_DAE passes a two-stage synchroniser here. The counters, the
// "greater than" compares and the gating follow the document.
module trs_efc
  import trs_pkg::*;
#(
  parameter int unsigned STEP = EFA_STEP_DEF
) (
  input  logic        m_clk,
  input  logic        rst_n,
  input  logic        s_tick,
  input  logic        t_tick,
  input  logic        sfc,
  input  logic        wdog_a,
  input  logic        run_dae,
  input  trs_ctrl_t   ctrl,
  input  logic [15:0] reg_dly,
  input  logic [15:0] reg_lth,
  output logic        efa,
  output logic        start_ul,
  output logic        stop_efa
);
  localparam int unsigned PW = $clog2(STEP + 1);
  logic          run_s1, run_s2, sfc_d;
  logic          dly_run;
  logic [PW-1:0] dpre, lpre;
  logic [16:0]   dcnt, lcnt;
  logic          no_dly, no_lth, trig, dly_done, lth_done;

  assign no_dly   = (dcnt == {1'b0, reg_dly});
  assign no_lth   = (lcnt == {1'b0, reg_lth});
  assign trig     = sfc & ~sfc_d & ~wdog_a & ~no_dly & ~no_lth & ctrl.mo & ~ctrl.eo;
  assign dly_done = dly_run & (dcnt > {1'b0, reg_dly});
  assign lth_done = start_ul & (lcnt > {1'b0, reg_lth});

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      run_s1 <= 1'b0; run_s2 <= 1'b0;
      sfc_d  <= 1'b0;
    end else begin
      run_s1 <= run_dae; run_s2 <= run_s1;
      sfc_d  <= sfc;
    end
  end

  // Delay circuit (6FF.C6, 6CT.C6/6CP.C5 prescaler, 6CT.C4/6CP.C3 counter).
  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_run <= 1'b0;
      dpre    <= '0;
      dcnt    <= '0;
    end else if (dly_done) begin
      dly_run <= 1'b0;
      dpre    <= '0;
      dcnt    <= '0;
    end else begin
      if (trig && !ctrl.do_) dly_run <= 1'b1;
      if (dly_run && s_tick) begin
        if (dpre == PW'(STEP)) dpre <= PW'(1);
        else begin
          dpre <= dpre + 1'b1;
          if (dpre == PW'(STEP - 1)) dcnt <= dcnt + 1'b1;
        end
      end
    end
  end

  // Length circuit (6CT.A6/6CP.B5 prescaler, 6CT.B4/6CP.B3 counter).
  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      start_ul <= 1'b0;
      lpre     <= '0;
      lcnt     <= '0;
    end else if (lth_done) begin
      start_ul <= 1'b0;
      lpre     <= '0;
      lcnt     <= '0;
    end else begin
      if (dly_done || (trig && ctrl.do_)) start_ul <= 1'b1;
      if (start_ul && s_tick) begin
        if (lpre == PW'(STEP)) lpre <= PW'(1);
        else begin
          lpre <= lpre + 1'b1;
          if (lpre == PW'(STEP - 1)) lcnt <= lcnt + 1'b1;
        end
      end
    end
  end

  trs_pulse_stretch #(.WIDTH(PRESF_WIDTH_T)) u_stop (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(lth_done), .clear(1'b0), .q(stop_efa)
  );

  assign efa = (run_s2 | ctrl.rn) & ((start_ul & ~wdog_a) | ctrl.fa);
endmodule
