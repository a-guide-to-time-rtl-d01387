// trs_limit_gen: limit generator of the TRS logic.
//
// It produces the limit window against which the comparator checks the
// arrival of every ISIS pulse inside a superframe. A 17-bit counter advances
// on the 5 MHz S_CLK while system control enables it (l_clk_en). LOAD_LL
// preloads it with LIM[7:0]; from then on it counts up to PERIOD (99999,
// tuned to the measured ISIS period of 19999.8 us), where the lower-limit
// pulse LL (100 us) starts, and then restarts at 1. So the first LL comes
// (PERIOD - LIM[7:0]) x 0.2 us after the first enabled S_CLK, that is
// LIM[7:0] x 0.2 us before the expected next ISIS pulse, and every further LL
// exactly one PERIOD later.
// The leading edge of LL starts a second counter on the 10 MHz clock; when it
// reaches LIM[15:8] (0.1 us units) the upper-limit pulse UL (150 us) starts.
// The window is LL rising to UL rising, at most 25.5 us wide.
//
// Interface: lim is register 2166; ll, ul are levels; cycle_mon shows LL for
// test. Timing: LL and UL rise one cycle after their compare is met and last
// 100 and 150 T_CLK periods. Counter widths, the 99999 period and both pulse
// lengths are the document's; the enable-based clocking is this design's.
module trs_limit_gen
  import trs_pkg::*;
#(
  parameter int unsigned PERIOD = LL_PERIOD_DEF
) (
  input  logic        m_clk,
  input  logic        rst_n,
  input  logic        s_tick,
  input  logic        t_tick,
  input  logic        l_clk_en,
  input  logic        load_ll,
  input  logic [15:0] lim,
  output logic        ll,
  output logic        ul,
  output logic        cycle_mon
);
  localparam int unsigned CW = $clog2(PERIOD + 1);
  logic [CW-1:0] cnt;
  logic          eq_d;
  logic [7:0]    ucnt;
  logic          ul_fired;
  logic          ll_start, ul_start, eq;

  assign eq = (cnt == CW'(PERIOD));

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      eq_d <= 1'b0;
    end else begin
      eq_d <= eq;
      if (s_tick && l_clk_en) begin
        if (load_ll)  cnt <= CW'(lim[7:0]);
        else if (eq)  cnt <= CW'(1);
        else          cnt <= cnt + 1'b1;
      end
    end
  end

  assign ll_start = eq & ~eq_d;

  trs_pulse_stretch #(.WIDTH(LL_WIDTH_T)) u_ll (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(ll_start), .clear(1'b0), .q(ll)
  );

  // Upper limit: counts 0.1 us from the leading edge of LL.
  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      ucnt     <= '0;
      ul_fired <= 1'b0;
    end else if (!ll) begin
      ucnt     <= '0;
      ul_fired <= 1'b0;
    end else if (!ul_fired) begin
      if (ucnt >= lim[15:8]) ul_fired <= 1'b1;
      else                   ucnt <= ucnt + 1'b1;
    end
  end

  assign ul_start = ll & ~ul_fired & (ucnt >= lim[15:8]);

  trs_pulse_stretch #(.WIDTH(UL_WIDTH_T)) u_ul (
    .clk(m_clk), .rst_n, .tick(t_tick), .start(ul_start), .clear(1'b0), .q(ul)
  );

  assign cycle_mon = ll;
endmodule
