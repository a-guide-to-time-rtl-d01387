// trs_comparator: ISIS period checker of the TRS logic.
//
// The first ITP of a superframe only switches the comparator on (on its
// trailing edge). Every later ITP is tested against the limit window: if LL is
// high and UL not yet high when the ITP arrives, the pulse passes and the IFC
// ("ISIS frame count") output goes high. The decision point is the end of LL
// while UL is still high:
//   * after a pass, IFC is ended 90 us later (so IFC lasts about 165-190 us);
//   * without a pass (ITP early, late or missing) the comparator fails: GRST
//     (general reset, 90 us) starts and, unless the superframe was already
//     complete, VETO (same pulse) tells the DAE to drop the superframe.
// PRE_SF (superframe complete) and GRST switch the comparator off. PRE_SF also
// sets a "complete" flag, cleared by the next SFC, which suppresses VETO.
// The IFC of the pulse that completes the superframe still ends normally at
// the end of its window, although PRE_SF has switched the comparator off.
// IOFF (30 ms without ISIS, from system control) starts GRST whether or not
// the comparator is on, so a source failure between superframes resets the
// system without discarding the completed superframe.
//
// Interface: all inputs are levels in the m_clk domain except ioff, a strobe.
// Timing: IFC rises 1 cycle after the ITP edge; GRST rises 1 cycle after the
// fall of LL (or after IOFF) and lasts 90 T_CLK periods. The flip-flop
// structure and pulse lengths are the document's; the single-clock timing
// is this design's.
module trs_comparator
  import trs_pkg::*;
(
  input  logic m_clk,
  input  logic rst_n,
  input  logic t_tick,
  input  logic itp,
  input  logic ll,
  input  logic ul,
  input  logic pre_sf,
  input  logic sfc,
  input  logic ioff,
  output logic ifc,
  output logic grst,
  output logic veto
);
  logic itp_d, dec_d, tail, tail_d;
  logic on_ff, pass_ff, grst_ff, done_ff;
  logic itp_rise, itp_fall, dec, dec_rise, fail, tail_start, tail_end;

  assign itp_rise = itp & ~itp_d;
  assign itp_fall = ~itp & itp_d;
  assign dec      = ul & ~ll;          // LL over, UL still high
  assign dec_rise = dec & ~dec_d;
  assign fail     = (dec_rise & on_ff & ~pass_ff) | ioff;
  assign tail_start = (dec_rise & (on_ff | pass_ff)) | ioff;
  assign tail_end   = tail_d & ~tail;

  trs_pulse_stretch #(.WIDTH(GRST_WIDTH_T)) u_tail (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(tail_start), .clear(1'b0), .q(tail)
  );

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      itp_d   <= 1'b0;
      dec_d   <= 1'b0;
      tail_d  <= 1'b0;
      on_ff   <= 1'b0;
      pass_ff <= 1'b0;
      grst_ff <= 1'b0;
      done_ff <= 1'b0;
    end else begin
      itp_d  <= itp;
      dec_d  <= dec;
      tail_d <= tail;

      if (grst_ff || fail || pre_sf) on_ff <= 1'b0;
      else if (itp_fall)             on_ff <= 1'b1;

      if (tail_end)                  pass_ff <= 1'b0;
      else if (itp_rise && on_ff)    pass_ff <= ll & ~ul;

      if (tail_end)                  grst_ff <= 1'b0;
      else if (fail)                 grst_ff <= 1'b1;

      if (sfc)                       done_ff <= 1'b0;
      else if (pre_sf)               done_ff <= 1'b1;
    end
  end

  assign ifc  = pass_ff;
  assign grst = grst_ff;
  assign veto = grst_ff & ~done_ff;
endmodule
