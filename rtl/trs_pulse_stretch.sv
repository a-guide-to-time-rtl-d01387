// trs_pulse_stretch: a one-shot that turns a start strobe into a pulse lasting
// WIDTH ticks of a slower clock enable.
//
// It stands for the flip-flop plus clock-divider pairs of the original
// schematic (for example the LL, UL, GRST and PRE_SF pulse formers), where a
// flip-flop is set by an event and cleared after a divider has counted a fixed
// number of 1 MHz periods. Here the output q rises on the cycle after `start`
// and falls after WIDTH rising `tick` enables, so its length is WIDTH tick
// periods, less up to one tick period of phase, as in the original.
// A start while the pulse is active is ignored; `clear` ends it at once.
module trs_pulse_stretch #(
  parameter int unsigned WIDTH = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,   // clock enable that measures the width
  input  logic start,  // one-cycle (or longer) request
  input  logic clear,  // synchronous abort
  output logic q
);
  localparam int unsigned CW = (WIDTH < 2) ? 1 : $clog2(WIDTH + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= 1'b0;
      cnt <= '0;
    end else if (clear) begin
      q   <= 1'b0;
      cnt <= '0;
    end else if (!q) begin
      if (start) begin
        q   <= 1'b1;
        cnt <= '0;
      end
    end else if (tick) begin
      if (cnt == CW'(WIDTH - 1)) begin
        q   <= 1'b0;
        cnt <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
