// drir: Data Rate based Intelligent Router.
//
// A serial line carrying mixed traffic (digitised voice and broadband data) is
// split onto a high data rate (HDR) and a low data rate (LDR) output. The rate
// is judged from the width of each data pulse: a pulse counter counts the time
// base ticks for which i_data is high (on_count); when the pulse ends the count
// is copied into the pulse counter register (on_count_reg) and the counter
// restarts. A comparator sets the pulse counter register (PR) against the
// reference register (RR, i_ref). Short pulses (PR < RR or PR = RR) mean a high
// rate; long pulses (PR > RR) mean a low rate. The comparator result is the
// select of a demultiplexer that passes i_data to o_high_frq or o_low_frq, and
// o_high_valid / o_low_valid say which output currently carries the line.
//
// An off counter counts the ticks for which i_data is low. When it saturates
// the line is taken to be silent: o_no_data rises and both valids drop, which
// signals the "no data" case on the outputs.
//
// Follows the document: the pulse counter, pulse counter register, reference
// register, three-way comparator, the demultiplexer, the names and widths
// on_count[5:0], on_count_reg[5:0], off_count[5:0] and i_ref[3:0], and the rule
// "on_count_reg <= i_ref is high rate". This design's own choices: the counters
// saturate instead of wrapping; a tick enable (i_tick) lets the time base
// generator set the counting rate (tie it high to count clock cycles); the
// silence rule (off_count saturated); reset is synchronous, active high, and
// clears every register, so the line starts out on the HDR output.
//
// Timing: the classification is registered and changes one clock after the end
// of a pulse, so a pulse is routed by the width of the pulse before it. The
// demultiplexer itself is combinational from i_data to the outputs.
module drir #(
  parameter int unsigned CNT_W = 6,
  parameter int unsigned REF_W = 4
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_tick,
  input  logic             i_data,
  input  logic [REF_W-1:0] i_ref,
  output logic             o_high_frq,
  output logic             o_high_valid,
  output logic             o_low_frq,
  output logic             o_low_valid,
  output logic             o_no_data,
  output logic [CNT_W-1:0] o_on_count,
  output logic [CNT_W-1:0] o_on_count_reg,
  output logic [CNT_W-1:0] o_off_count,
  output logic             o_pr_lt_rr,
  output logic             o_pr_eq_rr,
  output logic             o_pr_gt_rr
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic             data_q;
  logic             active;
  logic [CNT_W-1:0] on_count;
  logic [CNT_W-1:0] on_count_reg;
  logic [CNT_W-1:0] off_count;
  logic [CNT_W-1:0] ref_ext;
  logic             sel_low;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      data_q       <= 1'b0;
      active       <= 1'b0;
      on_count     <= '0;
      on_count_reg <= '0;
      off_count    <= '0;
    end else begin
      active <= 1'b1;
      data_q <= i_data;
      // pulse counter: ticks while the line is high
      if (data_q && !i_data) begin
        on_count_reg <= on_count;
        on_count     <= '0;
      end else if (i_data && i_tick && on_count != CNT_MAX) begin
        on_count <= on_count + 1'b1;
      end
      // off counter: ticks while the line is low
      if (i_data)                                   off_count <= '0;
      else if (i_tick && off_count != CNT_MAX)      off_count <= off_count + 1'b1;
    end
  end

  // comparator: pulse counter register against reference register
  assign ref_ext    = CNT_W'(i_ref);
  assign o_pr_lt_rr = on_count_reg <  ref_ext;
  assign o_pr_eq_rr = on_count_reg == ref_ext;
  assign o_pr_gt_rr = on_count_reg >  ref_ext;
  assign sel_low    = o_pr_gt_rr && !(o_pr_lt_rr || o_pr_eq_rr);

  // demultiplexer
  assign o_no_data    = (off_count == CNT_MAX);
  assign o_high_valid = active && !o_no_data && !sel_low;
  assign o_low_valid  = active && !o_no_data &&  sel_low;
  assign o_high_frq   = i_data && o_high_valid;
  assign o_low_frq    = i_data && o_low_valid;

  assign o_on_count     = on_count;
  assign o_on_count_reg = on_count_reg;
  assign o_off_count    = off_count;

endmodule
