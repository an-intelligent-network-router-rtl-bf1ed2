// decade_counter: one stage of the time base generator.
//
// A synchronous modulo-RATIO counter (RATIO = 10, a decade counter) that
// advances only on cycles where i_en is high. o_tc is a one-cycle strobe on the
// enabled cycle at which the count wraps from RATIO-1 back to 0, so the strobe
// rate is the enable rate divided by RATIO. o_sq is a square wave at the same
// rate: low for the first RATIO/2 counts and high for the rest (50 % duty for
// an even RATIO).
//
// The document chains its decade counters as ripple clocks (each stage's
// terminal count clocks the next). Here every stage runs on the one system
// clock and the terminal count is used as a clock enable instead; this is this
// design's own choice and gives the same division without extra clock domains.
//
// Timing: o_tc and o_sq are combinational decodes of the registered count and
// of i_en; reset (i_rst, synchronous, active high) clears the count.
module decade_counter #(
  parameter int unsigned RATIO = 10
) (
  input  logic i_clk,
  input  logic i_rst,
  input  logic i_en,
  output logic o_tc,
  output logic o_sq
);

  localparam int unsigned W = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [W-1:0] count;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      count <= '0;
    end else if (i_en) begin
      if (count == W'(RATIO - 1)) count <= '0;
      else                        count <= count + 1'b1;
    end
  end

  assign o_tc = i_en && (count == W'(RATIO - 1));
  assign o_sq = (count >= W'(RATIO / 2));

endmodule
