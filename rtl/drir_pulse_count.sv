// drir_pulse_count: data rate router by pulses per time window.
//
// The pulse count method of rate segregation. A pulse counter counts the
// pulses (rising edges of i_data) that arrive during one time window; the
// window is closed by a strobe from the time base generator (its one-second
// pulse by default in the top). At the end of each window the count is
// copied into the pulse counter register and the counter restarts. The
// register is compared with the reference (threshold) register:
//   - more pulses than the threshold: high data rate (HDR);
//   - at least one pulse but no more than the threshold: low data rate (LDR);
//   - no pulse at all in the last window: no data, neither output is valid.
// A demultiplexer passes i_data to o_hdr_data or o_ldr_data accordingly.
//
// Follows the document: counting pulses per second, a threshold count that
// separates high from low rate ("High Data Rate if the count value exceeds the
// threshold, and Low Data Rate otherwise"), the one-second pulse from the time
// base, a pulse counter register of the same size as the reference register,
// and an explicit no-data indication. This design's own choices: pulses are
// counted on their rising edge; a window with no pulse means "no data"; the
// counter width (20 bits, enough for the 1 MHz high rate example counted over
// one second), saturation of the counter, and a synchronous active-high reset
// after which the line is in the no-data state until a window has closed.
//
// Timing: the classification is registered and changes on the clock after the
// window strobe i_window, so each window is routed by the count of the window
// before it. The demultiplexer is combinational from i_data.
module drir_pulse_count #(
  parameter int unsigned CNT_W = 20
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_window,
  input  logic             i_data,
  input  logic [CNT_W-1:0] i_ref,
  output logic             o_hdr_data,
  output logic             o_hdr_valid,
  output logic             o_ldr_data,
  output logic             o_ldr_valid,
  output logic             o_no_data,
  output logic [CNT_W-1:0] o_pulse_count,
  output logic [CNT_W-1:0] o_pulse_reg
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic             data_q;
  logic             rise;
  logic [CNT_W-1:0] pulse_count;
  logic [CNT_W-1:0] pulse_reg;
  logic [CNT_W-1:0] count_now;   // count including a pulse starting this cycle
  logic             high_rate;

  assign rise      = i_data && !data_q;
  assign count_now = (rise && pulse_count != CNT_MAX) ? pulse_count + 1'b1 : pulse_count;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      data_q      <= 1'b0;
      pulse_count <= '0;
      pulse_reg   <= '0;
    end else begin
      data_q <= i_data;
      if (i_window) begin
        pulse_reg   <= count_now;
        pulse_count <= '0;
      end else begin
        pulse_count <= count_now;
      end
    end
  end

  // comparator and demultiplexer
  assign high_rate   = (pulse_reg > i_ref);
  assign o_no_data   = (pulse_reg == '0);
  assign o_hdr_valid = !o_no_data &&  high_rate;
  assign o_ldr_valid = !o_no_data && !high_rate;
  assign o_hdr_data  = i_data && o_hdr_valid;
  assign o_ldr_data  = i_data && o_ldr_valid;

  assign o_pulse_count = pulse_count;
  assign o_pulse_reg   = pulse_reg;

endmodule
