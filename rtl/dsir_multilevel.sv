// dsir_multilevel: data size router with a programmable number of size levels.
//
// Generalizes dsir from two paths (normal, bulk) to LEVELS paths, for example
// byte, kilobyte and megabyte channels. A packet is a run of cycles with
// i_valid high and ends on the first cycle with i_valid low. Each accepted
// byte goes into a line buffer and advances the byte counter (data_count).
// There are LEVELS-1 size thresholds i_ref[k], given in ascending order; a
// packet belongs to level L = the number of thresholds its byte count exceeds
// (level 0 holds packets of at most i_ref[0] bytes, the top level packets of
// more than i_ref[LEVELS-2] bytes).
//   - As long as the count has not passed the top threshold the level is not
//     final, so the bytes wait in the line buffer; when the packet ends, the
//     buffered packet is played out on path o_valid/o_data[L].
//   - Once the count passes the top threshold the packet is on the top level:
//     the line buffer drains onto the top path at one byte per cycle while the
//     rest of the packet streams through.
// When the packet has ended and the line buffer is empty, the counter clears.
// o_ready is low while a finished packet is played out.
//
// Follows the document: the number of bulk levels and their size limits are
// user programmable, the channels may be byte, kilobyte and megabyte
// channels, and line buffers keep data from being lost when a packet moves to
// a bulk path. This design's own choices: the level is the count of thresholds
// exceeded (so thresholds should be ascending), the same packet framing,
// store-and-forward play-out, back-pressure, counter and buffer sizing as dsir
// (2**REF_W entries, enough for the largest top threshold plus one), and a
// synchronous active-high reset. With LEVELS = 2 it behaves as dsir.
//
// Timing: outputs are registered. A packet below the top level appears on its
// path starting two cycles after the idle cycle that ends it; a top-level
// packet starts two cycles after its byte i_ref[LEVELS-2]+1 is accepted.
module dsir_multilevel #(
  parameter int unsigned LEVELS = 3,
  parameter int unsigned DATA_W = 4,
  parameter int unsigned REF_W  = 4,
  parameter int unsigned CNT_W  = 6,
  localparam int unsigned LVL_W = (LEVELS > 2) ? $clog2(LEVELS) : 1
) (
  input  logic                              i_clk,
  input  logic                              i_rst,
  input  logic                              i_valid,
  input  logic [DATA_W-1:0]                 i_data,
  input  logic [LEVELS-2:0][REF_W-1:0]      i_ref,
  output logic                              o_ready,
  output logic [LEVELS-1:0]                 o_valid,
  output logic [LEVELS-1:0][DATA_W-1:0]     o_data,
  output logic [LVL_W-1:0]                  o_level,
  output logic [CNT_W-1:0]                  o_data_count
);

  localparam int unsigned DEPTH = 2 ** REF_W;
  localparam logic [CNT_W-1:0] CNT_MAX = '1;
  localparam logic [LVL_W-1:0] TOP = LVL_W'(LEVELS - 1);

  logic [CNT_W-1:0]  data_count;
  logic              draining;   // packet has ended; play out what is buffered
  logic [LVL_W-1:0]  level;
  logic              stream;
  logic              accept;
  logic              pop;
  logic              buf_empty;
  logic              buf_full;
  logic [DATA_W-1:0] buf_dout;
  logic [$clog2(DEPTH+1)-1:0] buf_count;

  // level = number of thresholds the byte count exceeds
  always_comb begin
    level = '0;
    for (int k = 0; k < LEVELS - 1; k++)
      if (data_count > CNT_W'(i_ref[k])) level = level + 1'b1;
  end

  assign stream  = (level == TOP);
  assign o_ready = !draining;
  assign accept  = i_valid && o_ready;
  assign pop     = !buf_empty && (stream || draining);

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_line_buf (
    .i_clk   (i_clk),
    .i_rst   (i_rst),
    .i_push  (accept),
    .i_din   (i_data),
    .i_pop   (pop),
    .o_dout  (buf_dout),
    .o_empty (buf_empty),
    .o_full  (buf_full),
    .o_count (buf_count)
  );

  // byte counter and packet framing
  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      data_count <= '0;
      draining   <= 1'b0;
    end else if (draining) begin
      if (buf_empty || (pop && buf_count == 1)) begin
        draining   <= 1'b0;
        data_count <= '0;
      end
    end else if (accept) begin
      if (data_count != CNT_MAX) data_count <= data_count + 1'b1;
    end else if (data_count != '0) begin
      draining <= 1'b1;   // i_valid dropped: the packet is complete
    end
  end

  // demultiplexer onto LEVELS paths, registered
  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      o_valid <= '0;
      o_data  <= '0;
    end else begin
      for (int l = 0; l < LEVELS; l++) begin
        o_valid[l] <= pop && (level == LVL_W'(l));
        o_data[l]  <= (pop && (level == LVL_W'(l))) ? buf_dout : '0;
      end
    end
  end

  assign o_level      = level;
  assign o_data_count = data_count;

  // the line buffer is sized so that it never overflows
  assert property (@(posedge i_clk) disable iff (i_rst) !(accept && buf_full && !pop));

endmodule
