// request_arbiter: request queue buffer and duration arbitrator.
//
// Data requests, each tagged with its duration class, wait in a request queue
// buffer of QUEUE_DEPTH (100) entries. The arbitrator looks at the oldest
// request and hands it to a free router of its class. The routers are split
// by class in the ratio 7:2:1: N_SHORT short duration routers, N_MEDIUM medium
// and N_LONG long ones, so that the common short requests (about 70 % of all)
// are not held up behind long ones as they are when every request competes
// for the same few routers.
//
// Channel numbering: 0 .. N_SHORT-1 are the short duration routers, the next
// N_MEDIUM the medium ones, the last N_LONG the long ones. A router is busy
// from the cycle after it is given a request until its i_done bit is pulsed.
//
// Interface: i_req_valid / o_req_ready is a valid-ready handshake into the
// queue (a request is taken on a cycle where both are high). o_issue_valid is
// a one-cycle strobe naming the router (o_issue_chan) given the request
// o_issue_id. o_hol_wait is high while the oldest request waits because every
// router of its class is busy (requests are served strictly in order).
//
// Follows the document: the 100-request queue, the three duration classes and
// the 7:2:1 router ratio. This design's own choices: the request format, the
// handshake, in-order service, lowest-numbered free router first, and a
// synchronous active-high reset that empties the queue and frees every router.
//
// Timing: a request at the head of the queue is issued in the same cycle in
// which a router of its class is free; one request is issued per cycle.
module request_arbiter
  import router_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 100,
  parameter int unsigned N_SHORT     = 7,
  parameter int unsigned N_MEDIUM    = 2,
  parameter int unsigned N_LONG      = 1,
  localparam int unsigned N_CH       = N_SHORT + N_MEDIUM + N_LONG,
  localparam int unsigned CH_W       = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                             i_clk,
  input  logic                             i_rst,
  input  logic                             i_req_valid,
  input  dur_req_t                         i_req,
  output logic                             o_req_ready,
  input  logic [N_CH-1:0]                  i_done,
  output logic                             o_issue_valid,
  output logic [CH_W-1:0]                  o_issue_chan,
  output logic [REQ_ID_W-1:0]              o_issue_id,
  output dur_class_e                       o_issue_class,
  output logic [N_CH-1:0]                  o_busy,
  output logic                             o_hol_wait,
  output logic [$clog2(QUEUE_DEPTH+1)-1:0] o_queue_count
);

  logic [N_CH-1:0] busy;
  logic [N_CH-1:0] pool;
  logic [N_CH-1:0] free;
  logic            q_empty;
  logic            q_full;
  logic            pick_ok;
  logic [CH_W-1:0] pick;
  dur_req_t        head;

  sync_fifo #(.WIDTH($bits(dur_req_t)), .DEPTH(QUEUE_DEPTH)) u_queue (
    .i_clk   (i_clk),
    .i_rst   (i_rst),
    .i_push  (i_req_valid && o_req_ready),
    .i_din   (i_req),
    .i_pop   (o_issue_valid),
    .o_dout  (head),
    .o_empty (q_empty),
    .o_full  (q_full),
    .o_count (o_queue_count)
  );

  assign o_req_ready = !q_full;

  // routers that may take the head request
  always_comb begin
    for (int c = 0; c < int'(N_CH); c++) begin
      unique case (head.dur)
        DUR_SHORT:  pool[c] = (c < int'(N_SHORT));
        DUR_MEDIUM: pool[c] = (c >= int'(N_SHORT)) && (c < int'(N_SHORT + N_MEDIUM));
        default:    pool[c] = (c >= int'(N_SHORT + N_MEDIUM));
      endcase
    end
  end

  assign free = pool & ~busy;

  // lowest-numbered free router of the class
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int c = int'(N_CH) - 1; c >= 0; c--) begin
      if (free[c]) begin
        pick_ok = 1'b1;
        pick    = CH_W'(c);
      end
    end
  end

  assign o_issue_valid = !q_empty && pick_ok;
  assign o_issue_chan  = pick;
  assign o_issue_id    = head.id;
  assign o_issue_class = head.dur;
  assign o_hol_wait    = !q_empty && !pick_ok;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      busy <= '0;
    end else begin
      busy <= busy & ~i_done;
      if (o_issue_valid) busy[pick] <= 1'b1;
    end
  end

  assign o_busy = busy;

  // a done pulse only ever frees a busy router
  assert property (@(posedge i_clk) disable iff (i_rst) (i_done & ~busy) == '0);

endmodule
