// ddir: Data Duration based Intelligent Router.
//
// Routes a serial line to one of three channels by how long data has been
// present on it: the short duration (SDDR), medium duration (MDDR) and long
// duration (LDDR) channels. Two counters are cascaded. The first (a mod-5
// counter with the default i_short_len = 5) counts the time base ticks on which
// i_data is high; while it has not reached its terminal count the data is
// short duration. Its terminal count enables the second counter (a mod-4
// counter with the default i_medium_len = 4); while that one has not reached
// its terminal count the data is medium duration. Once it has, the data is long
// duration and stays on the long channel until reset. With the defaults, data
// pulses 1 to 5 go to the short channel, 6 to 9 to the medium one and 10 and
// above to the long one.
//
// Interface: o_short_data, o_medium_data and o_long_data carry i_data on the
// active channel and are held low on the other two (the document tri-states
// them; an on-chip signal cannot float, so each channel has an enable,
// o_*_en, instead). o_class gives the active class and o_count the total
// number of ticks with data present (saturating).
//
// Follows the document: the counter cascade (mod-5 then mod-4), the class table
// (0-5 short, 6-9 medium, 10 and above long), the long channel being held until
// reset, the 5-bit count. This design's own choices: the stage lengths are
// inputs so that the thresholds can be set at run time; data counts only while
// i_data is high and a gap in the data holds the count rather than clearing
// it; i_tick sets the counting rate (the document clocks the counter from the
// one-second time base; tie it high to count clock cycles); reset is
// synchronous and active high.
//
// Timing: the channel used for a tick's data depends on the ticks counted
// before it, so the class changes one clock after the tick that ends a stage.
module ddir
  import router_pkg::*;
#(
  parameter int unsigned CNT_W = 5
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_tick,
  input  logic             i_data,
  input  logic [CNT_W-1:0] i_short_len,
  input  logic [CNT_W-1:0] i_medium_len,
  output logic             o_short_data,
  output logic             o_medium_data,
  output logic             o_long_data,
  output logic             o_short_en,
  output logic             o_medium_en,
  output logic             o_long_en,
  output dur_class_e       o_class,
  output logic [CNT_W-1:0] o_count
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [CNT_W-1:0] short_cnt;   // first stage (mod-5 by default)
  logic [CNT_W-1:0] medium_cnt;  // second stage (mod-4 by default)
  logic [CNT_W-1:0] total_cnt;
  logic             short_tc;
  logic             medium_tc;
  logic             count_now;

  assign short_tc  = (short_cnt == i_short_len);
  assign medium_tc = short_tc && (medium_cnt == i_medium_len);
  assign count_now = i_tick && i_data;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      short_cnt  <= '0;
      medium_cnt <= '0;
      total_cnt  <= '0;
    end else if (count_now) begin
      if (!short_tc)                    short_cnt  <= short_cnt + 1'b1;
      else if (!medium_tc)              medium_cnt <= medium_cnt + 1'b1;
      if (total_cnt != CNT_MAX)         total_cnt  <= total_cnt + 1'b1;
    end
  end

  always_comb begin
    if (!short_tc)       o_class = DUR_SHORT;
    else if (!medium_tc) o_class = DUR_MEDIUM;
    else                 o_class = DUR_LONG;
  end

  assign o_short_en    = (o_class == DUR_SHORT);
  assign o_medium_en   = (o_class == DUR_MEDIUM);
  assign o_long_en     = (o_class == DUR_LONG);
  assign o_short_data  = i_data && o_short_en;
  assign o_medium_data = i_data && o_medium_en;
  assign o_long_data   = i_data && o_long_en;
  assign o_count       = total_cnt;

endmodule
