// drir_pulse_count_tb: self-checking testbench for the pulse-count rate
// router.
//
// The TB closes counting windows itself (i_window) at random intervals and
// drives the line with fast pulse trains, slow pulse trains, trains with
// exactly the threshold number of pulses and silent windows. A reference model
// counts rising edges per window (an edge in the closing cycle belongs to the
// closing window) and, every cycle, the TB compares the valids, the no-data
// flag, the routed data and the pulse counter register with it. Two instances
// run on the same stimulus: one at the default 20-bit width and one 3 bits
// wide, so that counter saturation is covered too.
module drir_pulse_count_tb;

  localparam int W1 = 20;
  localparam int W2 = 3;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          win = 1'b0;
  logic          data = 1'b0;
  logic [W1-1:0] ref1 = 20'd6;
  logic [W2-1:0] ref2 = 3'd4;
  logic          hd1, hv1, ld1, lv1, nd1, hd2, hv2, ld2, lv2, nd2;
  logic [W1-1:0] cnt1, reg1;
  logic [W2-1:0] cnt2, reg2;

  int checks = 0;
  int failures = 0;
  int n_hdr = 0, n_ldr = 0, n_nd = 0, n_eq = 0, n_sat = 0;

  // model
  int   m_cnt = 0;
  int   m_reg = 0;
  logic prev = 1'b0;

  drir_pulse_count dut1 (
    .i_clk(clk), .i_rst(rst), .i_window(win), .i_data(data), .i_ref(ref1),
    .o_hdr_data(hd1), .o_hdr_valid(hv1), .o_ldr_data(ld1), .o_ldr_valid(lv1),
    .o_no_data(nd1), .o_pulse_count(cnt1), .o_pulse_reg(reg1)
  );

  drir_pulse_count #(.CNT_W(W2)) dut2 (
    .i_clk(clk), .i_rst(rst), .i_window(win), .i_data(data), .i_ref(ref2),
    .o_hdr_data(hd2), .o_hdr_valid(hv2), .o_ldr_data(ld2), .o_ldr_valid(lv2),
    .o_no_data(nd2), .o_pulse_count(cnt2), .o_pulse_reg(reg2)
  );

  always #5 clk = ~clk;

  function automatic int sat(input int v, input int w);
    return (v > (1 << w) - 1) ? (1 << w) - 1 : v;
  endfunction

  task automatic check_one(input logic d, input int r, input int rf, input int w,
                           input logic hv, input logic lv, input logic nd,
                           input logic hd, input logic ld, input int got_reg);
    logic e_nd, e_h;
    e_nd = (sat(r, w) == 0);
    e_h  = sat(r, w) > rf;
    checks++;
    if (nd !== e_nd || hv !== (!e_nd && e_h) || lv !== (!e_nd && !e_h) ||
        hd !== (d && !e_nd && e_h) || ld !== (d && !e_nd && !e_h) || got_reg != sat(r, w)) begin
      failures++;
      if (failures < 10)
        $display("t=%0t W=%0d mismatch: reg=%0d exp=%0d hv=%b lv=%b nd=%b", $time, w, got_reg,
                 sat(r, w), hv, lv, nd);
    end
  endtask

  // one cycle: drive line and window, check, advance model
  task automatic cycle(input logic d, input logic w);
    data = d;
    win  = w;
    #1;
    check_one(d, m_reg, int'(ref1), W1, hv1, lv1, nd1, hd1, ld1, int'(reg1));
    check_one(d, m_reg, int'(ref2), W2, hv2, lv2, nd2, hd2, ld2, int'(reg2));
    checks++;
    if (int'(cnt1) != sat(m_cnt, W1) || int'(cnt2) != sat(m_cnt, W2)) begin
      failures++;
      if (failures < 10) $display("t=%0t pulse counter %0d/%0d, expected %0d", $time, cnt1, cnt2, m_cnt);
    end
    if (m_reg == 0) n_nd++;
    else if (m_reg > int'(ref1)) n_hdr++;
    else n_ldr++;
    if (m_reg == int'(ref1)) n_eq++;
    if (m_reg > 7) n_sat++;
    @(negedge clk);
    if (d && !prev) m_cnt++;
    if (w) begin
      m_reg = m_cnt;
      m_cnt = 0;
    end
    prev = d;
  endtask

  // one window of len cycles with a pulse every period cycles (0: silent)
  task automatic window(input int len, input int period);
    for (int i = 0; i < len; i++) begin
      logic d;
      d = (period != 0) && ((i % period) < (period + 1) / 2);
      cycle(d, i == len - 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    window(60, 2);     // fast: 30 pulses
    window(60, 20);    // slow: 3 pulses
    window(60, 0);     // silence: no data
    window(60, 10);    // exactly 6 pulses = threshold: low rate
    window(60, 3);     // fast again
    for (int i = 0; i < 300; i++) begin
      if (i % 40 == 0) begin
        ref1 = W1'($urandom_range(1, 12));
        ref2 = W2'($urandom_range(1, 6));
      end
      window($urandom_range(20, 120), ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(2, 30));
    end
    checks += 5;
    if (n_hdr == 0) begin failures++; $display("high rate never seen"); end
    if (n_ldr == 0) begin failures++; $display("low rate never seen"); end
    if (n_nd == 0)  begin failures++; $display("no data never seen"); end
    if (n_eq == 0)  begin failures++; $display("count equal to threshold never seen"); end
    if (n_sat == 0) begin failures++; $display("narrow counter never saturated"); end
    $display("hdr=%0d ldr=%0d nodata=%0d equal=%0d sat=%0d", n_hdr, n_ldr, n_nd, n_eq, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
