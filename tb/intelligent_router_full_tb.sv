// intelligent_router_full_tb: end-to-end testbench for the intelligent router
// at its default size.
//
// Runs all parts of the router at once, each on its own input:
//   - time base: every divided strobe must fire exactly on its period
//     (10**(k+1) clocks for output k);
//   - rate router by pulse width: trains of one-clock pulses (high rate),
//     ten-clock pulses (low rate) and a long silence (no data), checked cycle
//     by cycle against a reference model;
//   - rate router by pulse count: afterwards the same line carries a fast
//     pulse train, a slow one and silence, each for two counting windows; a
//     model counts pulses per window and checks the outputs every cycle;
//   - duration router: data held on the line while the time base ticks;
//     the class must be short for ticks 1-5, medium for 6-9 and long from
//     10 on, and a restart must bring it back to short;
//   - size router: normal and bulk packets, checked byte by byte;
//   - multi-level size router: packets for each of its three paths (limits
//     4 and 10 bytes), checked byte by byte;
//   - request arbiter: requests of all three classes, enough of them to fill
//     the 100-entry queue, then released; every issue must go to a router of
//     the request's class.
// Every mechanism above is counted; one that never happened is a failure.
// This copy leaves every parameter of the router at its default: seven divider
// stages (10 MHz down to 1 Hz), the duration router counting on the one-second
// pulse and the pulse count router using one-second windows. One pass through
// short, medium and long duration takes eleven seconds of a 10 MHz clock
// (about 1.1e8 cycles). The pulse trains are 1 MHz (fast) and 1 kHz (slow)
// with a threshold of 100000 pulses per second.
module intelligent_router_full_tb;
  import router_pkg::*;

  localparam int STAGES   = 7;
  localparam int DDIR_SEL = 7;
  localparam int DRIR_SEL = 0;
  localparam int PC_SEL   = 7;     // counting window: one second
  localparam int FAST_PER = 10;    // fast train: 1 MHz
  localparam int SLOW_PER = 10000; // slow train: 1 kHz
  localparam int PC_REF   = 100000; // threshold between them
  localparam longint PC_WIN = 64'd10 ** PC_SEL;
  localparam int NC       = 10;
  localparam longint DUR_PERIOD = (DDIR_SEL == 0) ? 1 : 64'd10 ** DDIR_SEL;

  logic clk = 1'b0;
  logic rst = 1'b1;

  logic [STAGES-1:0] atg_tick, atg_clk;
  logic       rate_data = 1'b0;
  logic [3:0] rate_ref = 4'd4;
  logic       r_hf, r_hv, r_lf, r_lv, r_nd;
  logic [5:0] r_reg;
  logic       p_hd, p_hv, p_ld, p_lv, p_nd;
  logic [19:0] p_reg;
  logic       dur_restart = 1'b0;
  logic       dur_data = 1'b0;
  logic       d_s, d_m, d_l;
  dur_class_e d_cls;
  logic [4:0] d_cnt;
  logic       s_valid = 1'b0;
  logic [3:0] s_data = '0;
  logic [3:0] s_ref = 4'd4;
  logic       s_ready, n_v, b_v;
  logic       ms_valid = 1'b0;
  logic [3:0] ms_data = '0;
  logic [1:0][3:0] ms_ref = {4'd10, 4'd4};
  logic       ms_ready;
  logic [2:0] ms_v;
  logic [2:0][3:0] ms_d;
  logic [3:0] n_d, b_d;
  logic       q_valid = 1'b0;
  dur_req_t   q_req;
  logic       q_ready;
  logic [NC-1:0] q_done = '0;
  logic       iss_v, hol;
  logic [3:0] iss_ch;
  logic [REQ_ID_W-1:0] iss_id;
  dur_class_e iss_cls;
  logic [NC-1:0] rbusy;
  logic [6:0] qcnt;

  int checks = 0;
  int failures = 0;
  longint cyc = 0;

  // mechanism counters
  int m_high = 0, m_low = 0, m_nodata = 0;
  int m_hdr = 0, m_ldr = 0, m_pc_nodata = 0;
  int m_short = 0, m_medium = 0, m_long = 0, m_restart = 0;
  int m_normal = 0, m_bulk = 0;
  int m_lvl [3] = '{0, 0, 0};
  int m_iss [3] = '{0, 0, 0};
  int m_hol = 0, m_qfull = 0;
  int m_tick [STAGES];

  intelligent_router dut (
    .i_clk(clk), .i_rst(rst),
    .o_atg_tick(atg_tick), .o_atg_clk(atg_clk),
    .i_rate_data(rate_data), .i_rate_ref(rate_ref),
    .o_rate_high_frq(r_hf), .o_rate_high_valid(r_hv), .o_rate_low_frq(r_lf),
    .o_rate_low_valid(r_lv), .o_rate_no_data(r_nd), .o_rate_on_count_reg(r_reg),
    .i_rate_pc_ref(20'(PC_REF)), .o_rate_hdr_data(p_hd), .o_rate_hdr_valid(p_hv),
    .o_rate_ldr_data(p_ld), .o_rate_ldr_valid(p_lv), .o_rate_pc_no_data(p_nd),
    .o_rate_pulse_reg(p_reg),
    .i_dur_restart(dur_restart), .i_dur_data(dur_data),
    .i_dur_short_len(5'd5), .i_dur_medium_len(5'd4),
    .o_dur_short_data(d_s), .o_dur_medium_data(d_m), .o_dur_long_data(d_l),
    .o_dur_class(d_cls), .o_dur_count(d_cnt),
    .i_size_valid(s_valid), .i_size_data(s_data), .i_size_ref(s_ref),
    .o_size_ready(s_ready), .o_normal_valid(n_v), .o_normal_data(n_d),
    .o_bulk_valid(b_v), .o_bulk_data(b_d),
    .i_msize_valid(ms_valid), .i_msize_data(ms_data), .i_msize_ref(ms_ref),
    .o_msize_ready(ms_ready), .o_msize_valid(ms_v), .o_msize_data(ms_d),
    .i_req_valid(q_valid), .i_req(q_req), .o_req_ready(q_ready), .i_req_done(q_done),
    .o_issue_valid(iss_v), .o_issue_chan(iss_ch), .o_issue_id(iss_id),
    .o_issue_class(iss_cls), .o_router_busy(rbusy), .o_hol_wait(hol),
    .o_queue_count(qcnt)
  );

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("t=%0t cycle %0d: %s", $time, cyc, msg);
  endtask

  // ---------------------------------------------------------------- time base
  // cyc counts clock edges since reset was released; checked at each negedge
  always @(negedge clk) begin
    if (!rst) begin
      longint p;
      p = 10;
      for (int k = 0; k < STAGES; k++) begin
        if (atg_tick[k] !== ((cyc % p) == p - 1)) fail($sformatf("time base stage %0d", k));
        if (atg_tick[k]) m_tick[k]++;
        p = p * 10;
      end
      checks++;
      cyc++;
    end
  end

  // ------------------------------------------------------------- rate router
  int r_run = 0, r_last = 0, r_off = 0;
  logic r_prev = 1'b0;

  task automatic rate_cycle(input logic d);
    logic e_nd, e_low, e_hv, e_lv;
    rate_data = d;
    #1;
    e_nd  = (r_off == 63);
    e_low = (r_last > int'(rate_ref));
    e_hv  = !e_nd && !e_low;
    e_lv  = !e_nd && e_low;
    checks++;
    if (r_hv !== e_hv || r_lv !== e_lv || r_nd !== e_nd ||
        r_hf !== (d && e_hv) || r_lf !== (d && e_lv)) fail("rate router output");
    if (d && e_hv) m_high++;
    if (d && e_lv) m_low++;
    if (e_nd) m_nodata++;
    @(negedge clk);
    if (r_prev && !d) begin r_last = r_run; r_run = 0; end
    else if (d && r_run != 63) r_run++;
    if (d) r_off = 0; else if (r_off != 63) r_off++;
    r_prev = d;
  endtask

  task automatic rate_test();
    repeat (10) begin rate_cycle(1'b1); rate_cycle(1'b0); end
    repeat (5)  begin repeat (10) rate_cycle(1'b1); repeat (5) rate_cycle(1'b0); end
    repeat (70) rate_cycle(1'b0);
    repeat (10) begin rate_cycle(1'b1); rate_cycle(1'b0); end
  endtask

  // -------------------------------------------- rate router, pulse count method
  // model: rising edges per window, sampled at the clock edge like the DUT
  int   pc_cnt = 0, pc_reg = 0;
  logic pc_prev = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      logic w, e_nd, e_h;
      w    = (PC_SEL == 0) ? 1'b1 : atg_tick[PC_SEL-1];
      e_nd = (pc_reg == 0);
      e_h  = (pc_reg > PC_REF);
      if (p_nd !== e_nd || p_hv !== (!e_nd && e_h) || p_lv !== (!e_nd && !e_h) ||
          p_hd !== (rate_data && !e_nd && e_h) || p_ld !== (rate_data && !e_nd && !e_h) ||
          int'(p_reg) != pc_reg)
        fail($sformatf("pulse count router: reg=%0d expected %0d", p_reg, pc_reg));
      if (rate_data && !e_nd && e_h)  m_hdr++;
      if (rate_data && !e_nd && !e_h) m_ldr++;
      if (e_nd && (m_hdr != 0 || m_ldr != 0)) m_pc_nodata++;   // silent after data
      if (rate_data && !pc_prev) pc_cnt++;
      if (w) begin
        pc_reg = pc_cnt;
        pc_cnt = 0;
      end
      pc_prev = rate_data;
    end
  end

  task automatic pc_train(input longint cycles, input int period);
    for (longint i = 0; i < cycles; i++) begin
      rate_data = (period != 0) && ((i % period) < (period + 1) / 2);
      @(negedge clk);
    end
    rate_data = 1'b0;
  endtask

  task automatic rate_pc_test();
    pc_train(2 * PC_WIN, FAST_PER);
    pc_train(2 * PC_WIN, SLOW_PER);
    pc_train(2 * PC_WIN + 2, 0);
    checks++;
  endtask

  // --------------------------------------------------------- duration router
  task automatic dur_run(input int ticks_wanted);
    int   seen = 0;
    logic tk;
    dur_class_e e;
    dur_data = 1'b1;
    while (seen < ticks_wanted) begin
      #1;
      tk = (DDIR_SEL == 0) ? 1'b1 : atg_tick[DDIR_SEL-1];
      e  = (seen < 5) ? DUR_SHORT : (seen < 9) ? DUR_MEDIUM : DUR_LONG;
      if (d_cls !== e || d_s !== (e == DUR_SHORT) || d_m !== (e == DUR_MEDIUM) ||
          d_l !== (e == DUR_LONG)) fail($sformatf("duration class %0d, expected %0d", d_cls, e));
      if (tk) begin
        checks++;
        case (e)
          DUR_SHORT:  m_short++;
          DUR_MEDIUM: m_medium++;
          default:    m_long++;
        endcase
        seen++;
      end
      @(negedge clk);
    end
    dur_data = 1'b0;
  endtask

  task automatic dur_test();
    dur_run(11);                 // pulses 1..11 on the time base: short, medium, long
    @(negedge clk);
    checks++;
    if (d_cls !== DUR_LONG) fail("long channel released without restart");
    dur_restart = 1'b1;
    @(negedge clk);
    dur_restart = 1'b0;
    m_restart++;
    dur_run(3);                  // after the restart the data is short again
  endtask

  // ------------------------------------------------------------- size router
  logic [4:0] s_exp [$];

  always @(negedge clk) begin
    if (!rst && (n_v || b_v)) begin
      logic [4:0] e;
      checks++;
      if (s_exp.size() == 0) fail("unexpected size router output");
      else begin
        e = s_exp.pop_front();
        if (n_v && b_v) fail("both size paths valid");
        if (e[4] !== b_v || e[3:0] !== (b_v ? b_d : n_d)) fail("size router byte");
      end
    end
  end

  task automatic size_packet(input int len);
    logic bulk;
    while (!s_ready) @(negedge clk);
    bulk = (len > int'(s_ref));
    for (int i = 0; i < len; i++) begin
      s_valid = 1'b1;
      s_data  = 4'($urandom);
      s_exp.push_back({bulk, s_data});
      @(negedge clk);
    end
    s_valid = 1'b0;
    if (bulk) m_bulk++; else m_normal++;
    @(negedge clk);
  endtask

  task automatic size_test();
    size_packet(4);
    size_packet(6);
    size_packet(1);
    size_packet(30);
    size_packet(3);
    repeat (40) @(negedge clk);
    checks++;
    if (s_exp.size() != 0) fail("size router lost bytes");
  endtask

  // ------------------------------------------------- multi-level size router
  logic [5:0] ms_exp [$];   // {level, data}

  always @(negedge clk) begin
    if (!rst && ms_v != '0) begin
      logic [5:0] e;
      int lv;
      lv = ms_v[2] ? 2 : ms_v[1] ? 1 : 0;
      checks++;
      if ($countones(ms_v) != 1) fail("several multi-level size paths valid");
      if (ms_exp.size() == 0) fail("unexpected multi-level size router output");
      else begin
        e = ms_exp.pop_front();
        if (int'(e[5:4]) != lv || e[3:0] !== ms_d[lv]) fail("multi-level size router byte");
      end
    end
  end

  task automatic msize_packet(input int len);
    int lv;
    while (!ms_ready) @(negedge clk);
    lv = 0;
    if (len > int'(ms_ref[0])) lv++;
    if (len > int'(ms_ref[1])) lv++;
    for (int i = 0; i < len; i++) begin
      ms_valid = 1'b1;
      ms_data  = 4'($urandom);
      ms_exp.push_back({2'(lv), ms_data});
      @(negedge clk);
    end
    ms_valid = 1'b0;
    m_lvl[lv]++;
    @(negedge clk);
  endtask

  task automatic msize_test();
    msize_packet(4);
    msize_packet(6);
    msize_packet(12);
    msize_packet(2);
    msize_packet(40);
    msize_packet(10);
    repeat (40) @(negedge clk);
    checks++;
    if (ms_exp.size() != 0) fail("multi-level size router lost bytes");
  endtask

  // --------------------------------------------------------- request arbiter
  int q_sent = 0;
  dur_class_e q_cls_of [int];

  always @(negedge clk) begin
    if (!rst) begin
      if (iss_v) begin
        int lo, hi;
        lo = (iss_cls == DUR_SHORT) ? 0 : (iss_cls == DUR_MEDIUM) ? 7 : 9;
        hi = (iss_cls == DUR_SHORT) ? 6 : (iss_cls == DUR_MEDIUM) ? 8 : 9;
        checks++;
        if (int'(iss_ch) < lo || int'(iss_ch) > hi) fail("request issued to a router of the wrong class");
        if (!q_cls_of.exists(int'(iss_id)) || q_cls_of[int'(iss_id)] !== iss_cls)
          fail("issued request does not match what was queued");
        if (rbusy[iss_ch]) fail("request issued to a busy router");
        m_iss[int'(iss_cls)]++;
      end
      if (hol) m_hol++;
      if (!q_ready) m_qfull++;
    end
  end

  task automatic req_test();
    // 120 requests with no router finishing: the queue fills up
    while (q_sent < 120) begin
      q_req.id  = REQ_ID_W'(q_sent);
      q_req.dur = (q_sent % 10 < 7) ? DUR_SHORT : (q_sent % 10 < 9) ? DUR_MEDIUM : DUR_LONG;
      q_valid   = 1'b1;
      #1;
      if (q_ready) begin
        q_cls_of[q_sent] = q_req.dur;
        q_sent++;
      end
      @(negedge clk);
      q_valid = 1'b0;
      if (q_sent >= 110 && !q_ready) break;
    end
    q_valid = 1'b0;
    // routers finish one after another until the queue is empty
    for (int i = 0; i < 3000 && (qcnt != 0 || rbusy != '0); i++) begin
      q_done = rbusy & NC'($urandom);
      @(negedge clk);
    end
    q_done = '0;
    checks++;
    if (qcnt != 0) fail("request queue did not empty");
  endtask

  initial begin
    for (int k = 0; k < STAGES; k++) m_tick[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    fork
      begin
        rate_test();
        rate_pc_test();
      end
      dur_test();
      size_test();
      msize_test();
      req_test();
    join
    // let the slowest time base output fire twice
    while (cyc < 2 * (64'd10 ** STAGES)) @(negedge clk);
    checks += 15;
    if (m_hdr == 0)    fail("pulse count router: no high rate data");
    if (m_ldr == 0)    fail("pulse count router: no low rate data");
    if (m_pc_nodata == 0) fail("pulse count router: silent window never seen");
    if (m_high == 0)   fail("no high rate data");
    if (m_low == 0)    fail("no low rate data");
    if (m_nodata == 0) fail("no-data never flagged");
    if (m_short == 0)  fail("short duration never used");
    if (m_medium == 0) fail("medium duration never used");
    if (m_long == 0)   fail("long duration never used");
    if (m_restart == 0) fail("duration restart never done");
    if (m_normal == 0) fail("no normal packet");
    if (m_bulk == 0)   fail("no bulk packet");
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (m_lvl[l] == 0) fail($sformatf("multi-level size path %0d never used", l));
    end
    if (m_iss[0] == 0 || m_iss[1] == 0 || m_iss[2] == 0) fail("a request class was never issued");
    if (m_hol == 0)    fail("head of line never waited");
    if (m_qfull == 0)  fail("request queue never full");
    for (int k = 0; k < STAGES; k++) begin
      checks++;
      if (m_tick[k] == 0) fail($sformatf("time base stage %0d never fired", k));
    end
    $display("pulse count: hdr=%0d ldr=%0d cycles in a silent window=%0d", m_hdr, m_ldr, m_pc_nodata);
    $display("high=%0d low=%0d nodata=%0d short=%0d medium=%0d long=%0d restart=%0d",
             m_high, m_low, m_nodata, m_short, m_medium, m_long, m_restart);
    $display("size levels=%0d/%0d/%0d", m_lvl[0], m_lvl[1], m_lvl[2]);
    $display("normal=%0d bulk=%0d issued=%0d/%0d/%0d hol=%0d qfull=%0d cycles=%0d",
             m_normal, m_bulk, m_iss[0], m_iss[1], m_iss[2], m_hol, m_qfull, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (int'(20 * DUR_PERIOD + 3 * (64'd10 ** STAGES) + 8 * PC_WIN + 20000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
