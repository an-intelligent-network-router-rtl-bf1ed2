// drir_tb: self-checking testbench for the data rate based router.
//
// Drives the serial line with trains of short pulses (high data rate), long
// pulses (low data rate), pulses exactly as wide as the reference, silences
// long enough to count as "no data", and a phase where the count enable ticks
// on every other cycle only. A cycle-level reference model keeps the width of
// the last finished pulse and the length of the current silence, and every
// cycle the TB compares all routed outputs, the valids, the no-data flag and
// the pulse counter register with it. The classification must follow a pulse
// one clock after it ends (the document's threshold example: i_ref = 4, a
// pulse of up to 4 clocks is high rate).
module drir_tb;

  localparam int CNT_W = 6;
  localparam int CMAX  = (1 << CNT_W) - 1;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       tick = 1'b1;
  logic       data = 1'b0;
  logic [3:0] ref_v = 4'd4;
  logic       high_frq, high_valid, low_frq, low_valid, no_data;
  logic [CNT_W-1:0] on_count, on_count_reg, off_count;
  logic       lt, eq, gt;

  int checks = 0;
  int failures = 0;
  int n_high = 0, n_low = 0, n_nodata = 0, n_equal = 0;

  // reference model state
  int  run = 0;        // ticks of the current pulse
  int  last = 0;       // width of the last finished pulse
  int  off = 0;        // ticks of the current silence
  logic prev = 1'b0;   // line value in the previous cycle

  drir dut (
    .i_clk(clk), .i_rst(rst), .i_tick(tick), .i_data(data), .i_ref(ref_v),
    .o_high_frq(high_frq), .o_high_valid(high_valid), .o_low_frq(low_frq),
    .o_low_valid(low_valid), .o_no_data(no_data), .o_on_count(on_count),
    .o_on_count_reg(on_count_reg), .o_off_count(off_count),
    .o_pr_lt_rr(lt), .o_pr_eq_rr(eq), .o_pr_gt_rr(gt)
  );

  always #5 clk = ~clk;

  // one cycle: drive the line, check, then advance the model
  task automatic cycle(input logic d);
    logic e_nd, e_low, e_hv, e_lv;
    data = d;
    #1;
    e_nd  = (off == CMAX);
    e_low = (last > int'(ref_v));
    e_hv  = !e_nd && !e_low;
    e_lv  = !e_nd &&  e_low;
    checks++;
    if (high_valid !== e_hv || low_valid !== e_lv || no_data !== e_nd ||
        high_frq !== (d && e_hv) || low_frq !== (d && e_lv) ||
        int'(on_count_reg) != last || eq !== (last == int'(ref_v))) begin
      failures++;
      if (failures < 10)
        $display("t=%0t mismatch: d=%b hv=%b lv=%b nd=%b reg=%0d (exp hv=%b lv=%b nd=%b last=%0d)",
                 $time, d, high_valid, low_valid, no_data, on_count_reg, e_hv, e_lv, e_nd, last);
    end
    if (e_hv && d) n_high++;
    if (e_lv && d) n_low++;
    if (e_nd) n_nodata++;
    if (e_hv && last == int'(ref_v) && last != 0) n_equal++;
    @(negedge clk);
    // model update, mirroring what the registers see at the clock edge
    if (prev && !d) begin
      last = run;
      run  = 0;
    end else if (d && tick && run != CMAX) begin
      run++;
    end
    if (d) off = 0;
    else if (tick && off != CMAX) off++;
    prev = d;
  endtask

  task automatic pulse(input int width, input int gap);
    repeat (width) cycle(1'b1);
    repeat (gap)   cycle(1'b0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    @(negedge clk);   // one cycle for the routing to come out of reset
    // a burst of one-clock pulses (high rate) ...
    repeat (8) pulse(1, 1);
    // ... then wide pulses (low rate)
    repeat (6) pulse(10, 6);
    // pulses exactly as wide as the reference are high rate
    repeat (4) pulse(4, 3);
    // silence long enough to be "no data", then data again
    pulse(2, 70);
    repeat (3) pulse(2, 2);
    // other references and random widths
    for (int i = 0; i < 400; i++) begin
      if (i % 50 == 0) ref_v = 4'($urandom_range(1, 15));
      pulse($urandom_range(1, 20), $urandom_range(1, 12));
    end
    // a pulse longer than the counter range saturates it
    pulse(80, 3);
    repeat (3) pulse(3, 3);
    // slower time base: count only every other cycle
    for (int i = 0; i < 200; i++) begin
      tick = (i % 2 == 0);
      pulse($urandom_range(1, 12), $urandom_range(1, 8));
    end
    tick = 1'b1;
    // mechanisms that must have been seen
    checks++; if (n_high == 0)   begin failures++; $display("no high rate data routed"); end
    checks++; if (n_low == 0)    begin failures++; $display("no low rate data routed"); end
    checks++; if (n_nodata == 0) begin failures++; $display("no-data never seen"); end
    checks++; if (n_equal == 0)  begin failures++; $display("equal width never seen"); end
    $display("high=%0d low=%0d nodata=%0d equal=%0d", n_high, n_low, n_nodata, n_equal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
