// ddir_tb: self-checking testbench for the data duration based router.
//
// First a directed run with the document's thresholds (stage lengths 5 and
// 4) and data held high on every clock: pulses 1-5 must leave on the
// short channel, 6-9 on the medium one and 10 onwards on the long one, and the
// long channel must be kept through a gap in the data until reset. Then a run
// with operator-set lengths of 10 and 10 (short up to tick 10, medium up to
// tick 20), and random runs with random stage lengths, random gaps in the data
// and a random count enable, each started by a reset. A reference model counts the enabled data
// cycles since reset and gives the expected class
//   cnt < S: short,  cnt < S + M: medium,  otherwise long
// from which all channel outputs, enables and the saturating count are checked
// every cycle.
module ddir_tb;
  import router_pkg::*;

  localparam int CNT_W = 5;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic             tick = 1'b1;
  logic             data = 1'b0;
  logic [CNT_W-1:0] s_len = 5'd5;
  logic [CNT_W-1:0] m_len = 5'd4;
  logic             o_s, o_m, o_l, e_s, e_m, e_l;
  dur_class_e       cls;
  logic [CNT_W-1:0] count;

  int checks = 0;
  int failures = 0;
  int cnt = 0;
  int n_cls [3] = '{0, 0, 0};

  ddir dut (
    .i_clk(clk), .i_rst(rst), .i_tick(tick), .i_data(data),
    .i_short_len(s_len), .i_medium_len(m_len),
    .o_short_data(o_s), .o_medium_data(o_m), .o_long_data(o_l),
    .o_short_en(e_s), .o_medium_en(e_m), .o_long_en(e_l),
    .o_class(cls), .o_count(count)
  );

  always #5 clk = ~clk;

  function automatic dur_class_e model_class(input int c);
    if (c < int'(s_len))              return DUR_SHORT;
    if (c < int'(s_len) + int'(m_len)) return DUR_MEDIUM;
    return DUR_LONG;
  endfunction

  task automatic do_reset();
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    cnt = 0;
  endtask

  task automatic cycle(input logic d);
    dur_class_e e;
    data = d;
    #1;
    e = model_class(cnt);
    checks++;
    if (cls !== e || e_s !== (e == DUR_SHORT) || e_m !== (e == DUR_MEDIUM) ||
        e_l !== (e == DUR_LONG) || o_s !== (d && e == DUR_SHORT) ||
        o_m !== (d && e == DUR_MEDIUM) || o_l !== (d && e == DUR_LONG) ||
        int'(count) != ((cnt > 31) ? 31 : cnt)) begin
      failures++;
      if (failures < 10)
        $display("t=%0t mismatch: d=%b cls=%0d exp=%0d count=%0d model=%0d",
                 $time, d, cls, e, count, cnt);
    end
    if (d) n_cls[int'(e)]++;
    @(negedge clk);
    if (d && tick) cnt++;
  endtask

  // channel that carries data pulse number k (1-based) with the defaults
  task automatic directed();
    s_len = 5'd5;
    m_len = 5'd4;
    tick  = 1'b1;
    do_reset();
    for (int k = 1; k <= 14; k++) begin
      data = 1'b1;
      #1;
      checks++;
      if ((k <= 5 && !o_s) || (k >= 6 && k <= 9 && !o_m) || (k >= 10 && !o_l) ||
          (int'(o_s) + int'(o_m) + int'(o_l) != 1)) begin
        failures++;
        $display("pulse %0d on wrong channel: s=%b m=%b l=%b", k, o_s, o_m, o_l);
      end
      @(negedge clk);
      cnt++;
    end
    // a gap does not release the long channel
    repeat (5) cycle(1'b0);
    repeat (3) cycle(1'b1);
    checks++;
    if (!e_l) begin failures++; $display("long channel released without reset"); end
    // reset starts over on the short channel
    do_reset();
    cycle(1'b1);
    checks++;
    if (!e_s) begin failures++; $display("reset did not restart on short channel"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    directed();
    // thresholds set by the operator: short up to 10 ticks, medium up to 20
    s_len = 5'd10;
    m_len = 5'd10;
    do_reset();
    repeat (25) cycle(1'b1);
    for (int run_i = 0; run_i < 60; run_i++) begin
      s_len = 5'($urandom_range(0, 12));
      m_len = 5'($urandom_range(0, 12));
      do_reset();
      for (int i = 0; i < 80; i++) begin
        tick = ($urandom_range(0, 3) != 0);
        cycle(($urandom_range(0, 4) != 0));
      end
    end
    tick = 1'b1;
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (n_cls[c] == 0) begin failures++; $display("class %0d never used", c); end
    end
    $display("short=%0d medium=%0d long=%0d", n_cls[0], n_cls[1], n_cls[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
