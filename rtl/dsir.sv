// dsir: Data Size based Intelligent Router.
//
// Separates normal (small) packets from bulk (large) packets on a byte-wide
// stream. A packet is a run of cycles with i_valid high; a packet ends on the
// first cycle with i_valid low. Every accepted byte goes into a line buffer
// (FIFO) and advances the byte counter (data_count). The counter's terminal
// count TC is "data_count > i_ref" and drives the demultiplexer select:
//   - while TC is low the bytes wait in the line buffer; if the packet ends
//     with TC still low (at most i_ref bytes) the buffered packet is played
//     out on the normal path (o_normal_valid / o_normal_data);
//   - as soon as TC goes high (byte i_ref+1 has arrived) the packet is bulk:
//     the line buffer starts draining onto the bulk path (o_bulk_valid /
//     o_bulk_data) at one byte per cycle while the rest of the packet streams
//     through, so a bulk packet of any length passes without loss.
// When the packet has ended and the line buffer is empty, the counter clears
// and the next packet can start. o_ready is low while a finished packet is
// being played out; a sender must hold off the next packet until it is high.
//
// Follows the document: byte counter, TC as the select of the demultiplexer,
// the threshold "count reaches i_ref+1 (5 for i_ref = 4) means bulk", the line
// buffer that collects normal and bulk data so that nothing is lost or
// retransmitted, and the names and widths i_data[3:0], i_ref[3:0],
// data_count[5:0]. This design's own choices: packets framed by i_valid, the
// store-and-forward play-out of normal packets, the o_ready back-pressure, a
// saturating counter, a line buffer of 2**REF_W entries (enough for the
// largest normal packet plus one), and a synchronous active-high reset.
//
// Timing: output bytes are registered. A normal packet appears on the normal
// path starting two cycles after the idle cycle that ends it (three after its
// last byte) and leaves at one byte per cycle; a bulk packet appears on the
// bulk path starting two cycles after its byte i_ref+1 is accepted.
module dsir #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned REF_W  = 4,
  parameter int unsigned CNT_W  = 6
) (
  input  logic              i_clk,
  input  logic              i_rst,
  input  logic              i_valid,
  input  logic [DATA_W-1:0] i_data,
  input  logic [REF_W-1:0]  i_ref,
  output logic              o_ready,
  output logic              o_normal_valid,
  output logic [DATA_W-1:0] o_normal_data,
  output logic              o_bulk_valid,
  output logic [DATA_W-1:0] o_bulk_data,
  output logic              o_tc,
  output logic [CNT_W-1:0]  o_data_count
);

  localparam int unsigned DEPTH = 2 ** REF_W;
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [CNT_W-1:0]  data_count;
  logic              draining;   // packet has ended; play out what is buffered
  logic              tc;
  logic              accept;
  logic              pop;
  logic              buf_empty;
  logic              buf_full;
  logic [DATA_W-1:0] buf_dout;
  logic [$clog2(DEPTH+1)-1:0] buf_count;

  assign o_ready = !draining;
  assign accept  = i_valid && o_ready;
  assign tc      = (data_count > CNT_W'(i_ref));
  assign pop     = !buf_empty && (tc || draining);

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

  // demultiplexer with registered outputs
  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      o_normal_valid <= 1'b0;
      o_bulk_valid   <= 1'b0;
      o_normal_data  <= '0;
      o_bulk_data    <= '0;
    end else begin
      o_normal_valid <= pop && !tc;
      o_bulk_valid   <= pop &&  tc;
      o_normal_data  <= (pop && !tc) ? buf_dout : '0;
      o_bulk_data    <= (pop &&  tc) ? buf_dout : '0;
    end
  end

  assign o_tc         = tc;
  assign o_data_count = data_count;

  // the line buffer is sized so that it never overflows
  assert property (@(posedge i_clk) disable iff (i_rst) !(accept && buf_full && !pop));

endmodule
