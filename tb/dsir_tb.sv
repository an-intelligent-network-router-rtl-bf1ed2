// dsir_tb: self-checking testbench for the data size based router.
//
// Sends packets (runs of i_valid) and checks that each one comes out whole, in
// order and on the right path: a packet of at most i_ref bytes on the normal
// path, a longer one on the bulk path. The first two packets repeat the
// document's example (i_ref = 4: a 4-byte packet 1,2,3,4 is normal, a 6-byte
// packet 1..6 is bulk). Random packets of 1 to 70 bytes with random i_ref
// follow, covering the largest normal packet (15 bytes), a full line buffer (i_ref = 15 and 16 bytes held) and
// a saturated byte counter. Latencies are checked as well: the first byte of a
// bulk packet leaves two cycles after byte i_ref+1 is accepted, the first byte
// of a normal packet two cycles after the idle cycle that ends the packet.
// A second instance, widened to a 7-bit threshold and an 8-bit byte counter,
// runs the document's threshold of 100 bytes: packets of 100 bytes (normal),
// 101 and 150 bytes (bulk) must each come out whole on the right path.
module dsir_tb;

  localparam int DW = 4;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          valid = 1'b0;
  logic [DW-1:0] din = '0;
  logic [3:0]    ref_v = 4'd4;
  logic          ready;
  logic          nv, bv, tc;
  logic [DW-1:0] nd, bd;
  logic [5:0]    dcount;

  int checks = 0;
  int failures = 0;
  int n_normal_pkts = 0, n_bulk_pkts = 0, n_sat = 0, n_full = 0;
  longint cyc = 0;

  // scoreboard: expected bytes as {bulk, data}
  logic [DW:0] exp_q [$];
  longint      first_due [$];   // cycle at which each packet's first byte is due
  logic        pkt_started = 1'b0;

  dsir dut (
    .i_clk(clk), .i_rst(rst), .i_valid(valid), .i_data(din), .i_ref(ref_v),
    .o_ready(ready), .o_normal_valid(nv), .o_normal_data(nd),
    .o_bulk_valid(bv), .o_bulk_data(bd), .o_tc(tc), .o_data_count(dcount)
  );

  // threshold-100 instance
  logic          w_valid = 1'b0;
  logic [DW-1:0] w_din = '0;
  logic          w_ready, w_nv, w_bv, w_tc;
  logic [DW-1:0] w_nd, w_bd;
  logic [7:0]    w_dcount;
  logic [DW:0]   w_exp_q [$];
  int            w_normal = 0, w_bulk = 0;

  dsir #(.REF_W(7), .CNT_W(8)) dut100 (
    .i_clk(clk), .i_rst(rst), .i_valid(w_valid), .i_data(w_din), .i_ref(7'd100),
    .o_ready(w_ready), .o_normal_valid(w_nv), .o_normal_data(w_nd),
    .o_bulk_valid(w_bv), .o_bulk_data(w_bd), .o_tc(w_tc), .o_data_count(w_dcount)
  );

  always @(negedge clk) begin
    logic [DW:0] e;
    if (!rst && (w_nv || w_bv)) begin
      checks++;
      if (w_nv && w_bv || w_exp_q.size() == 0) begin
        failures++; $display("threshold 100: unexpected output at cycle %0d", cyc);
      end else begin
        e = w_exp_q.pop_front();
        if (e[DW] !== w_bv || e[DW-1:0] !== (w_bv ? w_bd : w_nd)) begin
          failures++; $display("threshold 100: wrong byte at cycle %0d", cyc);
        end
        if (w_nv) w_normal++; else w_bulk++;
      end
    end
  end

  task automatic send100(input int len);
    while (!w_ready) @(negedge clk);
    for (int i = 0; i < len; i++) begin
      w_din   = DW'($urandom);
      w_valid = 1'b1;
      w_exp_q.push_back({(len > 100) ? 1'b1 : 1'b0, w_din});
      @(negedge clk);
    end
    w_valid = 1'b0;
    @(negedge clk);
  endtask

  always #5 clk = ~clk;

  always @(posedge clk) cyc <= cyc + 1;

  // output monitor
  always @(negedge clk) begin
    if (!rst) begin
      if (nv && bv) begin
        checks++; failures++; $display("both paths valid at cycle %0d", cyc);
      end else if (nv || bv) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected output at cycle %0d", cyc);
        end else begin
          logic [DW:0] e;
          e = exp_q.pop_front();
          if (e[DW] !== bv || e[DW-1:0] !== (bv ? bd : nd)) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d: got bulk=%b data=%0d, expected bulk=%b data=%0d",
                       cyc, bv, bv ? bd : nd, e[DW], e[DW-1:0]);
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
      if (ref_v == 4'd15 && dcount == 6'd16) n_full++;   // 16 bytes held: buffer full
      if (dcount == 6'h3f) n_sat++;
    end
  end

  // send one packet of len bytes; bytes are 1, 2, 3, ... when seq is set
  task automatic send(input int len, input bit seq);
    logic bulk;
    while (!ready) @(negedge clk);
    bulk = (len > int'(ref_v));
    for (int i = 0; i < len; i++) begin
      din   = seq ? DW'(i + 1) : DW'($urandom);
      valid = 1'b1;
      exp_q.push_back({bulk, din});
      if (bulk && i == int'(ref_v)) first_due.push_back(cyc + 2);
      @(negedge clk);
    end
    valid = 1'b0;
    din   = '0;
    if (!bulk) first_due.push_back(cyc + 2);
    if (bulk) n_bulk_pkts++; else n_normal_pkts++;
    @(negedge clk);
  endtask

  // mark that the next output byte starts a packet
  always @(negedge clk) begin
    if (!rst && (nv || bv) === 1'b0 && exp_q.size() != 0 && !pkt_started)
      pkt_started = 1'b1;
  end

  task automatic drain();
    int guard = 0;
    while ((exp_q.size() != 0 || !ready) && guard < 200) begin
      @(negedge clk);
      guard++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    fork
      begin
        send100(100);    // threshold 100: largest normal packet
        send100(101);    // smallest bulk packet
        send100(150);
      end
    join_none
    send(4, 1'b1);       // document example: normal
    repeat (3) @(negedge clk);
    send(6, 1'b1);       // document example: bulk
    drain();
    for (int i = 0; i < 300; i++) begin
      if (i % 20 == 0) begin
        drain();
        ref_v = (i % 60 == 0) ? 4'd15 : 4'($urandom_range(0, 15));
      end
      send((i % 37 == 5) ? 70 : $urandom_range(1, 24), 1'b0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    drain();             // the threshold only changes between packets
    ref_v = 4'd15;
    send(15, 1'b0);      // largest normal packet
    send(16, 1'b0);      // smallest bulk packet at this threshold
    drain();
    while (!w_ready || w_exp_q.size() != 0) @(negedge clk);
    checks += 3;
    if (w_normal != 100) begin failures++; $display("threshold 100: %0d normal bytes", w_normal); end
    if (w_bulk != 251)   begin failures++; $display("threshold 100: %0d bulk bytes", w_bulk); end
    if (w_dcount != 0)   begin failures++; $display("threshold 100: counter not cleared"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d bytes never came out", exp_q.size()); end
    checks++; if (n_normal_pkts == 0) begin failures++; $display("no normal packet"); end
    checks++; if (n_bulk_pkts == 0)   begin failures++; $display("no bulk packet"); end
    checks++; if (n_full == 0)        begin failures++; $display("line buffer never full"); end
    checks++; if (n_sat == 0)         begin failures++; $display("byte counter never saturated"); end
    $display("normal=%0d bulk=%0d full=%0d sat=%0d", n_normal_pkts, n_bulk_pkts, n_full, n_sat);
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
