// trs_clk_div: clock distribution of the TRS logic.
//
// The original circuit divides the 10 MHz master clock M_CLK into a 5 MHz
// S_CLK (limit generator and field control counters), a 1 MHz T_CLK (pulse
// timers) and a 10 kHz R_CLK, the latter made from T_CLK (ISIS loss timer).
// In this single-clock design each derived clock is a one-cycle enable,
// high on one M_CLK cycle per period of the derived clock; every register
// stays on M_CLK. The division ratios are the document's; using enables
// instead of separate clock nets is this design's choice.
//
// Timing: s_tick every 2 cycles, t_tick every 10, r_tick every 1000 (on the
// same cycle as a t_tick). All three start counting when rst_n is released.
module trs_clk_div #(
  parameter int unsigned S_DIV = trs_pkg::S_CLK_DIV,
  parameter int unsigned T_DIV = trs_pkg::T_CLK_DIV,
  parameter int unsigned R_DIV_T = trs_pkg::R_CLK_DIV / trs_pkg::T_CLK_DIV
) (
  input  logic m_clk,
  input  logic rst_n,
  output logic s_tick,  // 5 MHz enable
  output logic t_tick,  // 1 MHz enable
  output logic r_tick   // 10 kHz enable
);
  logic [$clog2(S_DIV)-1:0]   s_cnt;
  logic [$clog2(T_DIV)-1:0]   t_cnt;
  logic [$clog2(R_DIV_T)-1:0] r_cnt;

  always_ff @(posedge m_clk or negedge rst_n) begin
    if (!rst_n) begin
      s_cnt  <= '0;
      t_cnt  <= '0;
      r_cnt  <= '0;
      s_tick <= 1'b0;
      t_tick <= 1'b0;
      r_tick <= 1'b0;
    end else begin
      s_tick <= (s_cnt == $bits(s_cnt)'(S_DIV - 1));
      s_cnt  <= (s_cnt == $bits(s_cnt)'(S_DIV - 1)) ? '0 : s_cnt + 1'b1;
      t_tick <= (t_cnt == $bits(t_cnt)'(T_DIV - 1));
      r_tick <= (t_cnt == $bits(t_cnt)'(T_DIV - 1)) && (r_cnt == $bits(r_cnt)'(R_DIV_T - 1));
      if (t_cnt == $bits(t_cnt)'(T_DIV - 1)) begin
        t_cnt <= '0;
        r_cnt <= (r_cnt == $bits(r_cnt)'(R_DIV_T - 1)) ? '0 : r_cnt + 1'b1;
      end else begin
        t_cnt <= t_cnt + 1'b1;
      end
    end
  end
endmodule
