// trs_watchdog: watchdog of the TRS logic.
//
// WDOG_A: set by GRST (any reset of the TRS: ISIS pulse outside the limit
// window, or source failure). While high it blocks DAE pulses and EFA and
// stops SFC from starting the field. After a reset the superframe register
// runs a first dummy superframe; the SFC that starts the second one sets a
// second flip-flop that keeps WDOG_A high for the rest of that SFC and, after
// CLEAR_T (4) T_CLK periods, both flip-flops are cleared. So proper
// superframes, with DAE pulses and field, resume after two good dummy ones.
//
// WDOG_B: set at the end of the GRST that follows an IOFF (30 ms without
// ISIS). It puts the TRS in standby (system control then ignores ISIS) and
// enables a counter of ISIS_ON pulses. When the count reaches PULSES (10,
// i.e. 200 ms of uninterrupted pulses) WDOG_B is cleared at the end of that
// ISIS_ON pulse. GRST (a new failure) or LOAD_LL clears the count.
//
// Interface: grst, sfc, isis_on, load_ll are levels; ioff is a strobe.
// Timing: WDOG_A rises 1 cycle after GRST; WDOG_B rises 1 cycle after GRST
// falls. Remembering the IOFF until that GRST ends is this design's way of
// telling a failure reset from a window reset; the rest follows the document.
module trs_watchdog
  import trs_pkg::*;
#(
  parameter int unsigned PULSES  = WDB_PULSES_DEF,
  parameter int unsigned CLEAR_T = WDA_CLEAR_T
) (
  input  logic m_clk,
  input  logic rst_n,
  input  logic t_tick,
  input  logic grst,
  input  logic sfc,
  input  logic ioff,
  input  logic isis_on,
  input  logic load_ll,
  output logic wdog_a,
  output logic wdog_b,
  output logic [$clog2(PULSES+1)-1:0] b_count
);
  logic a_ff, hold_ff, sfc_d, grst_d, on_d, ioff_pend, clr, clr_d;

  trs_pulse_stretch #(.WIDTH(CLEAR_T)) u_clr (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(sfc & ~sfc_d & a_ff & ~hold_ff), .clear(1'b0), .q(clr)
  );

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      a_ff      <= 1'b0;
      hold_ff   <= 1'b0;
      sfc_d     <= 1'b0;
      grst_d    <= 1'b0;
      on_d      <= 1'b0;
      clr_d     <= 1'b0;
      ioff_pend <= 1'b0;
      wdog_b    <= 1'b0;
      b_count   <= '0;
    end else begin
      sfc_d  <= sfc;
      grst_d <= grst;
      on_d   <= isis_on;
      clr_d  <= clr;

      // WDOG_A circuit (7FF.D6, 7FF.D4, 7CD.C3)
      if (grst)                     a_ff <= 1'b1;
      else if (clr_d && !clr)       a_ff <= 1'b0;
      if (clr_d && !clr)            hold_ff <= 1'b0;
      else if (sfc && !sfc_d && a_ff) hold_ff <= 1'b1;

      // WDOG_B circuit (7FF.A4, 7CT.A6, 7CP.A6)
      if (ioff) ioff_pend <= 1'b1;
      if (grst_d && !grst && (ioff_pend || ioff)) begin
        wdog_b    <= 1'b1;
        ioff_pend <= 1'b0;
      end else if (wdog_b && on_d && !isis_on &&
                   b_count == $bits(b_count)'(PULSES)) begin
        wdog_b <= 1'b0;
      end

      if (grst || load_ll)
        b_count <= '0;
      else if (wdog_b && isis_on && !on_d && b_count != $bits(b_count)'(PULSES))
        b_count <= b_count + 1'b1;
    end
  end

  assign wdog_a = a_ff | hold_ff;
endmodule
