// intelligent_router: the intelligent (smart) router, top level.
//
// Raw data is segregated before routing by independent routers that sit side
// by side, one input per kind of routing:
//   - rate:     drir splits a serial line into high and low data rate outputs
//               by the width of its pulses, and drir_pulse_count splits the
//               same line by the number of pulses per time window;
//   - duration: ddir routes a serial line to the short, medium or long duration
//               channel by how long data has been present;
//   - size:     dsir routes byte-wide packets to the normal or bulk path by
//               their length, and dsir_multilevel routes a second byte-wide
//               stream onto SIZE_LEVELS paths (byte, kilobyte, megabyte
//               channels) by programmable size limits.
// A time base generator (atg) divides the board clock by ten, seven times
// (10 MHz down to 1 Hz). Its strobes set the counting rate of the rate and
// duration routers: DRIR_TICK_SEL and DDIR_TICK_SEL pick the strobe, 0 meaning
// every clock cycle and k (1..ATG_STAGES) meaning the k-th divided output
// (k = 7 is the one-second pulse); RATE_WIN_SEL picks the strobe that closes
// the pulse counting window of drir_pulse_count. A request queue with a
// duration arbitrator (request_arbiter) hands tagged duration requests to
// short, medium and long duration routers kept in the ratio 7:2:1.
//
// Follows the document: the three routing kinds, the time base generator
// and its 10 MHz to 1 Hz chain, the duration router counting on the
// one-second base (DDIR_TICK_SEL = 7), the pulse count router counting pulses
// per second (RATE_WIN_SEL = 7), the pulse width router counting clock cycles
// (DRIR_TICK_SEL = 0), the request queue and arbitrator. This design's own
// choices: a separate input for each kind of routing (the rate and duration routers
// read a serial line, the size router a byte-wide stream), one clock for
// everything, and a synchronous active-high reset; i_dur_restart restarts the
// duration router alone, for the next set of data.
//
// Timing: see the individual routers; everything runs on i_clk.
module intelligent_router
  import router_pkg::*;
#(
  parameter int unsigned ATG_STAGES    = 7,
  parameter int unsigned ATG_RATIO     = 10,
  parameter int unsigned DRIR_TICK_SEL = 0,
  parameter int unsigned DDIR_TICK_SEL = 7,
  parameter int unsigned RATE_WIN_SEL  = 7,
  parameter int unsigned RATE_PC_W     = 20,
  parameter int unsigned RATE_CNT_W    = 6,
  parameter int unsigned RATE_REF_W    = 4,
  parameter int unsigned DUR_CNT_W     = 5,
  parameter int unsigned SIZE_DATA_W   = 4,
  parameter int unsigned SIZE_REF_W    = 4,
  parameter int unsigned SIZE_CNT_W    = 6,
  parameter int unsigned SIZE_LEVELS   = 3,
  parameter int unsigned QUEUE_DEPTH   = 100,
  parameter int unsigned N_SHORT       = 7,
  parameter int unsigned N_MEDIUM      = 2,
  parameter int unsigned N_LONG        = 1,
  localparam int unsigned N_CH         = N_SHORT + N_MEDIUM + N_LONG,
  localparam int unsigned CH_W         = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                              i_clk,
  input  logic                              i_rst,
  // time base generator
  output logic [ATG_STAGES-1:0]             o_atg_tick,
  output logic [ATG_STAGES-1:0]             o_atg_clk,
  // data rate router
  input  logic                              i_rate_data,
  input  logic [RATE_REF_W-1:0]             i_rate_ref,
  output logic                              o_rate_high_frq,
  output logic                              o_rate_high_valid,
  output logic                              o_rate_low_frq,
  output logic                              o_rate_low_valid,
  output logic                              o_rate_no_data,
  output logic [RATE_CNT_W-1:0]             o_rate_on_count_reg,
  // data rate router, pulse count method (same line)
  input  logic [RATE_PC_W-1:0]              i_rate_pc_ref,
  output logic                              o_rate_hdr_data,
  output logic                              o_rate_hdr_valid,
  output logic                              o_rate_ldr_data,
  output logic                              o_rate_ldr_valid,
  output logic                              o_rate_pc_no_data,
  output logic [RATE_PC_W-1:0]              o_rate_pulse_reg,
  // data duration router
  input  logic                              i_dur_restart,
  input  logic                              i_dur_data,
  input  logic [DUR_CNT_W-1:0]              i_dur_short_len,
  input  logic [DUR_CNT_W-1:0]              i_dur_medium_len,
  output logic                              o_dur_short_data,
  output logic                              o_dur_medium_data,
  output logic                              o_dur_long_data,
  output dur_class_e                        o_dur_class,
  output logic [DUR_CNT_W-1:0]              o_dur_count,
  // data size router
  input  logic                              i_size_valid,
  input  logic [SIZE_DATA_W-1:0]            i_size_data,
  input  logic [SIZE_REF_W-1:0]             i_size_ref,
  output logic                              o_size_ready,
  output logic                              o_normal_valid,
  output logic [SIZE_DATA_W-1:0]            o_normal_data,
  output logic                              o_bulk_valid,
  output logic [SIZE_DATA_W-1:0]            o_bulk_data,
  // multi-level data size router
  input  logic                              i_msize_valid,
  input  logic [SIZE_DATA_W-1:0]            i_msize_data,
  input  logic [SIZE_LEVELS-2:0][SIZE_REF_W-1:0] i_msize_ref,
  output logic                              o_msize_ready,
  output logic [SIZE_LEVELS-1:0]            o_msize_valid,
  output logic [SIZE_LEVELS-1:0][SIZE_DATA_W-1:0] o_msize_data,
  // duration request queue and arbitrator
  input  logic                              i_req_valid,
  input  dur_req_t                          i_req,
  output logic                              o_req_ready,
  input  logic [N_CH-1:0]                   i_req_done,
  output logic                              o_issue_valid,
  output logic [CH_W-1:0]                   o_issue_chan,
  output logic [REQ_ID_W-1:0]               o_issue_id,
  output dur_class_e                        o_issue_class,
  output logic [N_CH-1:0]                   o_router_busy,
  output logic                              o_hol_wait,
  output logic [$clog2(QUEUE_DEPTH+1)-1:0]  o_queue_count
);

  logic [ATG_STAGES:0] tick_sel;   // 0: every cycle, k: k-th divided output
  logic                rate_tick;
  logic                dur_tick;
  logic                rate_window;

  atg #(.STAGES(ATG_STAGES), .RATIO(ATG_RATIO)) u_atg (
    .i_clk     (i_clk),
    .i_rst     (i_rst),
    .o_tick    (o_atg_tick),
    .o_clk_div (o_atg_clk)
  );

  assign tick_sel  = {o_atg_tick, 1'b1};
  assign rate_tick = tick_sel[DRIR_TICK_SEL];
  assign dur_tick  = tick_sel[DDIR_TICK_SEL];
  assign rate_window = tick_sel[RATE_WIN_SEL];

  drir #(.CNT_W(RATE_CNT_W), .REF_W(RATE_REF_W)) u_drir (
    .i_clk          (i_clk),
    .i_rst          (i_rst),
    .i_tick         (rate_tick),
    .i_data         (i_rate_data),
    .i_ref          (i_rate_ref),
    .o_high_frq     (o_rate_high_frq),
    .o_high_valid   (o_rate_high_valid),
    .o_low_frq      (o_rate_low_frq),
    .o_low_valid    (o_rate_low_valid),
    .o_no_data      (o_rate_no_data),
    .o_on_count     (),
    .o_on_count_reg (o_rate_on_count_reg),
    .o_off_count    (),
    .o_pr_lt_rr     (),
    .o_pr_eq_rr     (),
    .o_pr_gt_rr     ()
  );

  drir_pulse_count #(.CNT_W(RATE_PC_W)) u_drir_pc (
    .i_clk         (i_clk),
    .i_rst         (i_rst),
    .i_window      (rate_window),
    .i_data        (i_rate_data),
    .i_ref         (i_rate_pc_ref),
    .o_hdr_data    (o_rate_hdr_data),
    .o_hdr_valid   (o_rate_hdr_valid),
    .o_ldr_data    (o_rate_ldr_data),
    .o_ldr_valid   (o_rate_ldr_valid),
    .o_no_data     (o_rate_pc_no_data),
    .o_pulse_count (),
    .o_pulse_reg   (o_rate_pulse_reg)
  );

  ddir #(.CNT_W(DUR_CNT_W)) u_ddir (
    .i_clk         (i_clk),
    .i_rst         (i_rst || i_dur_restart),
    .i_tick        (dur_tick),
    .i_data        (i_dur_data),
    .i_short_len   (i_dur_short_len),
    .i_medium_len  (i_dur_medium_len),
    .o_short_data  (o_dur_short_data),
    .o_medium_data (o_dur_medium_data),
    .o_long_data   (o_dur_long_data),
    .o_short_en    (),
    .o_medium_en   (),
    .o_long_en     (),
    .o_class       (o_dur_class),
    .o_count       (o_dur_count)
  );

  dsir #(.DATA_W(SIZE_DATA_W), .REF_W(SIZE_REF_W), .CNT_W(SIZE_CNT_W)) u_dsir (
    .i_clk          (i_clk),
    .i_rst          (i_rst),
    .i_valid        (i_size_valid),
    .i_data         (i_size_data),
    .i_ref          (i_size_ref),
    .o_ready        (o_size_ready),
    .o_normal_valid (o_normal_valid),
    .o_normal_data  (o_normal_data),
    .o_bulk_valid   (o_bulk_valid),
    .o_bulk_data    (o_bulk_data),
    .o_tc           (),
    .o_data_count   ()
  );

  dsir_multilevel #(
    .LEVELS (SIZE_LEVELS),
    .DATA_W (SIZE_DATA_W),
    .REF_W  (SIZE_REF_W),
    .CNT_W  (SIZE_CNT_W)
  ) u_dsir_ml (
    .i_clk        (i_clk),
    .i_rst        (i_rst),
    .i_valid      (i_msize_valid),
    .i_data       (i_msize_data),
    .i_ref        (i_msize_ref),
    .o_ready      (o_msize_ready),
    .o_valid      (o_msize_valid),
    .o_data       (o_msize_data),
    .o_level      (),
    .o_data_count ()
  );

  request_arbiter #(
    .QUEUE_DEPTH (QUEUE_DEPTH),
    .N_SHORT     (N_SHORT),
    .N_MEDIUM    (N_MEDIUM),
    .N_LONG      (N_LONG)
  ) u_req_arb (
    .i_clk         (i_clk),
    .i_rst         (i_rst),
    .i_req_valid   (i_req_valid),
    .i_req         (i_req),
    .o_req_ready   (o_req_ready),
    .i_done        (i_req_done),
    .o_issue_valid (o_issue_valid),
    .o_issue_chan  (o_issue_chan),
    .o_issue_id    (o_issue_id),
    .o_issue_class (o_issue_class),
    .o_busy        (o_router_busy),
    .o_hol_wait    (o_hol_wait),
    .o_queue_count (o_queue_count)
  );

endmodule
