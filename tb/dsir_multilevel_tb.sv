// dsir_multilevel_tb: self-checking testbench for the multi-level size router.
//
// Runs the router with three levels (byte, kilobyte and megabyte channels in
// miniature) and sends packets (runs of i_valid). Each packet must come out
// whole, in order, and on path L = the number of thresholds its length
// exceeds. A directed part uses thresholds 4 and 10 with packets of 4, 6 and
// 12 bytes, one per level; random packets of 1 to 70 bytes with random
// ascending thresholds follow, covering every level, a full line buffer (top
// threshold 15, 16 bytes held) and a saturated byte counter. Latencies are
// checked too: the first byte of a top-level packet leaves two cycles after
// byte top-threshold+1 is accepted, the first byte of any other packet two
// cycles after the idle cycle that ends it.
module dsir_multilevel_tb;

  localparam int DW = 4;
  localparam int LV = 3;

  logic                  clk = 1'b0;
  logic                  rst = 1'b1;
  logic                  valid = 1'b0;
  logic [DW-1:0]         din = '0;
  logic [LV-2:0][3:0]    ref_v = {4'd10, 4'd4};
  logic                  ready;
  logic [LV-1:0]         ov;
  logic [LV-1:0][DW-1:0] od;
  logic [1:0]            olevel;
  logic [5:0]            dcount;

  int checks = 0;
  int failures = 0;
  int n_pkts [LV];
  int n_sat = 0, n_full = 0;
  longint cyc = 0;

  // scoreboard: expected bytes as {level, data}
  logic [DW+1:0] exp_q [$];
  longint        first_due [$];
  logic          pkt_started = 1'b0;

  dsir_multilevel #(.LEVELS(LV)) dut (
    .i_clk(clk), .i_rst(rst), .i_valid(valid), .i_data(din), .i_ref(ref_v),
    .o_ready(ready), .o_valid(ov), .o_data(od), .o_level(olevel),
    .o_data_count(dcount)
  );

  always #5 clk = ~clk;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int level_of(input int len);
    int l = 0;
    for (int k = 0; k < LV - 1; k++)
      if (len > int'(ref_v[k])) l++;
    return l;
  endfunction

  // output monitor
  always @(negedge clk) begin
    int lv;
    int nset;
    logic [DW+1:0] e;
    if (!rst) begin
      nset = 0;
      lv   = 0;
      for (int l = 0; l < LV; l++)
        if (ov[l]) begin nset++; lv = l; end
      if (nset > 1) begin
        checks++; failures++; $display("several paths valid at cycle %0d", cyc);
      end else if (nset == 1) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected output at cycle %0d", cyc);
        end else begin
          e = exp_q.pop_front();
          if (int'(e[DW+1:DW]) != lv || e[DW-1:0] !== od[lv]) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d: got level %0d data %0d, expected level %0d data %0d",
                       cyc, lv, od[lv], e[DW+1:DW], e[DW-1:0]);
          end
        end
        if (pkt_started) begin
          checks++;
          if (first_due.size() == 0 || first_due[0] != cyc) begin
            failures++;
            $display("first byte at cycle %0d, due %0d", cyc,
                     (first_due.size() != 0) ? first_due[0] : -1);
          end
          if (first_due.size() != 0) void'(first_due.pop_front());
          pkt_started = 1'b0;
        end
      end
      if (ref_v[LV-2] == 4'd15 && dcount == 6'd16) n_full++;
      if (dcount == 6'h3f) n_sat++;
    end
  end

  // mark that the next output byte starts a packet
  always @(negedge clk) begin
    if (!rst && ov == '0 && exp_q.size() != 0 && !pkt_started)
      pkt_started = 1'b1;
  end

  // send one packet of len bytes; bytes are 1, 2, 3, ... when seq is set
  task automatic send(input int len, input bit seq);
    int lv;
    while (!ready) @(negedge clk);
    lv = level_of(len);
    for (int i = 0; i < len; i++) begin
      din   = seq ? DW'(i + 1) : DW'($urandom);
      valid = 1'b1;
      exp_q.push_back({2'(lv), din});
      if (lv == LV - 1 && i == int'(ref_v[LV-2])) first_due.push_back(cyc + 2);
      @(negedge clk);
    end
    valid = 1'b0;
    din   = '0;
    if (lv != LV - 1) first_due.push_back(cyc + 2);
    n_pkts[lv]++;
    @(negedge clk);
  endtask

  task automatic drain();
    int guard = 0;
    while ((exp_q.size() != 0 || !ready) && guard < 200) begin
      @(negedge clk);
      guard++;
    end
  endtask

  initial begin
    int a, b;
    foreach (n_pkts[l]) n_pkts[l] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    send(4, 1'b1);       // level 0
    repeat (2) @(negedge clk);
    send(6, 1'b1);       // level 1
    repeat (2) @(negedge clk);
    send(12, 1'b1);      // level 2, streams through
    drain();
    for (int i = 0; i < 300; i++) begin
      if (i % 20 == 0) begin
        drain();
        a = $urandom_range(0, 14);
        b = (i % 60 == 0) ? 15 : $urandom_range(a, 15);
        ref_v = {4'(b), 4'(a)};
      end
      send((i % 37 == 5) ? 70 : $urandom_range(1, 24), 1'b0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    drain();
    ref_v = {4'd15, 4'd7};
    send(7, 1'b0);       // largest level-0 packet
    send(15, 1'b0);      // largest level-1 packet
    send(16, 1'b0);      // smallest level-2 packet, buffer full
    drain();
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d bytes never came out", exp_q.size()); end
    for (int l = 0; l < LV; l++) begin
      checks++;
      if (n_pkts[l] == 0) begin failures++; $display("no packet on level %0d", l); end
    end
    checks++; if (n_full == 0) begin failures++; $display("line buffer never full"); end
    checks++; if (n_sat == 0)  begin failures++; $display("byte counter never saturated"); end
    $display("level0=%0d level1=%0d level2=%0d full=%0d sat=%0d",
             n_pkts[0], n_pkts[1], n_pkts[2], n_full, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
