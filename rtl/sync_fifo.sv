// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries of WIDTH bits held in a register array; DEPTH need not be a
// power of two (the pointers wrap at DEPTH). A pop when empty is ignored, and so is a push
// when full unless a pop is done in the same cycle. o_dout is the oldest entry (valid while
// o_empty is low) and is read combinationally from the array. Reset is
// synchronous and active high and empties the FIFO; the array itself is not
// reset. Used as the line buffer of the size based router and as the request
// queue buffer of the duration request arbiter.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       i_clk,
  input  logic                       i_rst,
  input  logic                       i_push,
  input  logic [WIDTH-1:0]           i_din,
  input  logic                       i_pop,
  output logic [WIDTH-1:0]           o_dout,
  output logic                       o_empty,
  output logic                       o_full,
  output logic [$clog2(DEPTH+1)-1:0] o_count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr;
  logic [PW-1:0]    rd_ptr;
  logic [CW-1:0]    count;
  logic             do_push;
  logic             do_pop;

  assign o_empty = (count == '0);
  assign o_full  = (count == CW'(DEPTH));
  assign do_push = i_push && (!o_full || i_pop);
  assign do_pop  = i_pop && !o_empty;
  assign o_dout  = mem[rd_ptr];
  assign o_count = count;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge i_clk) begin
    if (do_push) mem[wr_ptr] <= i_din;
  end

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  // a full FIFO never grows and an empty one never shrinks
  assert property (@(posedge i_clk) disable iff (i_rst) count <= CW'(DEPTH));

endmodule
