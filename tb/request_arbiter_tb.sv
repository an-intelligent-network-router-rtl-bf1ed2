// request_arbiter_tb: self-checking testbench for the duration request queue
// and arbitrator.
//
// A reference model keeps its own copy of the request queue and of which of
// the ten routers (7 short, 2 medium, 1 long) are busy. Every cycle it works
// out which router, if any, the oldest request must go to (the lowest-numbered
// free router of its class) and compares that with the issue outputs, the busy
// flags, the head-of-line wait flag, the queue count and the ready signal.
// Phase 1 fills the queue to its 100 entries while no router finishes, so that
// back-pressure and head-of-line waiting both happen; phase 2 runs a random
// mix of 70 % short, 20 % medium and 10 % long requests with random finish
// times.
module request_arbiter_tb;
  import router_pkg::*;

  localparam int QD = 100;
  localparam int NS = 7, NM = 2, NL = 1;
  localparam int NC = NS + NM + NL;

  logic                 clk = 1'b0;
  logic                 rst = 1'b1;
  logic                 req_valid = 1'b0;
  dur_req_t             req;
  logic                 req_ready;
  logic [NC-1:0]        done = '0;
  logic                 issue_valid;
  logic [3:0]           issue_chan;
  logic [REQ_ID_W-1:0]  issue_id;
  dur_class_e           issue_class;
  logic [NC-1:0]        busy;
  logic                 hol_wait;
  logic [6:0]           qcount;

  int checks = 0;
  int failures = 0;
  int n_issue [3] = '{0, 0, 0};
  int n_hol = 0, n_full = 0;
  int next_id = 0;

  dur_req_t      mq [$];
  logic [NC-1:0] mbusy = '0;

  request_arbiter dut (
    .i_clk(clk), .i_rst(rst), .i_req_valid(req_valid), .i_req(req),
    .o_req_ready(req_ready), .i_done(done), .o_issue_valid(issue_valid),
    .o_issue_chan(issue_chan), .o_issue_id(issue_id), .o_issue_class(issue_class),
    .o_busy(busy), .o_hol_wait(hol_wait), .o_queue_count(qcount)
  );

  always #5 clk = ~clk;

  function automatic int lo(input dur_class_e c);
    return (c == DUR_SHORT) ? 0 : (c == DUR_MEDIUM) ? NS : NS + NM;
  endfunction
  function automatic int hi(input dur_class_e c);
    return (c == DUR_SHORT) ? NS : (c == DUR_MEDIUM) ? NS + NM : NC;
  endfunction

  function automatic dur_class_e rand_class();
    int r = $urandom_range(0, 9);
    return (r < 7) ? DUR_SHORT : (r < 9) ? DUR_MEDIUM : DUR_LONG;
  endfunction

  // one cycle: drive inputs, compare with the model, advance the model
  task automatic cycle(input bit offer, input int done_pct);
    int  pick;
    bit  e_ready;
    logic [NC-1:0] d;
    req_valid = offer;
    req.id    = REQ_ID_W'(next_id);
    req.dur   = rand_class();
    d = '0;
    for (int c = 0; c < NC; c++)
      if (mbusy[c] && busy[c] && $urandom_range(0, 99) < done_pct) d[c] = 1'b1;
    done = d;
    #1;
    pick = -1;
    if (mq.size() != 0)
      for (int c = hi(mq[0].dur) - 1; c >= lo(mq[0].dur); c--)
        if (!mbusy[c]) pick = c;
    e_ready = (mq.size() < QD);
    checks++;
    if (issue_valid !== (pick >= 0) || req_ready !== e_ready ||
        busy !== mbusy || int'(qcount) != mq.size() ||
        hol_wait !== (mq.size() != 0 && pick < 0) ||
        (pick >= 0 && (int'(issue_chan) != pick || issue_id !== mq[0].id ||
                       issue_class !== mq[0].dur))) begin
      failures++;
      if (failures < 10)
        $display("t=%0t mismatch: issue=%b chan=%0d (exp %0d) busy=%b (exp %b) q=%0d (exp %0d)",
                 $time, issue_valid, issue_chan, pick, busy, mbusy, qcount, mq.size());
    end
    if (pick >= 0) n_issue[int'(mq[0].dur)]++;
    if (mq.size() != 0 && pick < 0) n_hol++;
    if (!e_ready) n_full++;
    @(negedge clk);
    mbusy = mbusy & ~d;
    if (pick >= 0) begin
      mbusy[pick] = 1'b1;
      void'(mq.pop_front());
    end
    if (offer && e_ready) begin
      mq.push_back(req);
      next_id++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // phase 1: nothing finishes, the queue fills up
    for (int i = 0; i < 130; i++) cycle(1'b1, 0);
    // phase 2: random traffic
    for (int i = 0; i < 3000; i++) cycle($urandom_range(0, 1) == 1, 10);
    // let the queue empty
    for (int i = 0; i < 600; i++) cycle(1'b0, 30);
    req_valid = 1'b0;
    done = '0;
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (n_issue[c] == 0) begin failures++; $display("class %0d never issued", c); end
    end
    checks++; if (n_hol == 0)  begin failures++; $display("head of line never waited"); end
    checks++; if (n_full == 0) begin failures++; $display("queue never full"); end
    $display("issued short=%0d medium=%0d long=%0d hol=%0d full=%0d",
             n_issue[0], n_issue[1], n_issue[2], n_hol, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
