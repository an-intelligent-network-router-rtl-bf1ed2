// atg_tb: self-checking testbench for the time base generator.
//
// Runs the generator at its default size (seven decade stages) for just over
// two periods of the last stage, i.e. two one-second pulses of a 10 MHz clock.
// After reset the TB counts clock edges n and checks, on every cycle, that
//   o_tick[k]    = (n mod 10**(k+1) == 10**(k+1) - 1)
//   o_clk_div[k] = ((n / 10**k) mod 10 >= 5)
// and, at the end, that stage k fired exactly floor(N / 10**(k+1)) times,
// which checks the divided frequencies 1 MHz ... 1 Hz.
module atg_tb;

  localparam int unsigned STAGES = 7;
  localparam longint unsigned RUN = 64'd20_000_010;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [STAGES-1:0] tick;
  logic [STAGES-1:0] sq;

  int unsigned checks = 0;
  int unsigned failures = 0;
  longint unsigned n = 0;
  longint unsigned fired [STAGES];
  longint unsigned p;
  longint unsigned pn;
  logic            ok;
  logic            exp_tick;
  logic            exp_sq;

  atg dut (.i_clk(clk), .i_rst(rst), .o_tick(tick), .o_clk_div(sq));

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < STAGES; k++) fired[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    while (n < RUN) begin
      p  = 1;
      ok = 1'b1;
      for (int k = 0; k < STAGES; k++) begin
        pn       = p * 10;
        exp_tick = ((n % pn) == pn - 1);
        exp_sq   = (((n / p) % 10) >= 5);
        if (tick[k] !== exp_tick || sq[k] !== exp_sq) ok = 1'b0;
        if (tick[k]) fired[k]++;
        p = pn;
      end
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("mismatch at n=%0d tick=%b sq=%b", n, tick, sq);
      end
      @(negedge clk);
      n++;
    end
    begin
      p = 10;
      for (int k = 0; k < STAGES; k++) begin
        checks++;
        if (fired[k] != RUN / p) begin
          failures++;
          $display("stage %0d fired %0d times, expected %0d", k, fired[k], RUN / p);
        end
        p = p * 10;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (21_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
