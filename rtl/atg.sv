// atg: Accurate Time-based Generator.
//
// Divides the board clock by RATIO (ten) STAGES (seven) times in a chain of
// decade counters. With the document's 10 MHz board clock the stage outputs are
// 1 MHz, 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz; the last one is the
// one-second pulse that sets the time base of the segregating routers.
//
// Interface:
//   o_tick[k]    one-clock-cycle strobe at f_clk / RATIO**(k+1); use it as a
//                clock enable (o_tick[STAGES-1] is the 1 Hz / one second pulse)
//   o_clk_div[k] square wave at the same frequency (the data_1mhz ...
//                data_1hz waveforms), for observation or for driving a pin
//
// The stage count and the divide ratio are the document's. Running all stages
// on one clock with the previous stage's terminal count as enable (instead of
// a ripple clock) is this design's own choice. Reset is synchronous and active
// high. Latency: o_tick[k] first fires RATIO**(k+1) cycles after reset is
// released.
module atg #(
  parameter int unsigned STAGES = 7,
  parameter int unsigned RATIO  = 10
) (
  input  logic              i_clk,
  input  logic              i_rst,
  output logic [STAGES-1:0] o_tick,
  output logic [STAGES-1:0] o_clk_div
);

  logic [STAGES:0] en;

  assign en[0] = 1'b1;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    decade_counter #(.RATIO(RATIO)) u_div (
      .i_clk (i_clk),
      .i_rst (i_rst),
      .i_en  (en[k]),
      .o_tc  (en[k+1]),
      .o_sq  (o_clk_div[k])
    );
  end

  assign o_tick = en[STAGES:1];

endmodule
