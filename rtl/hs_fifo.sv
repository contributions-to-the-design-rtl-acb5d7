// hs_fifo: handshaking first-in first-out buffer.
//
// Models a chain of DEPTH buffers in which neighbours handshake as data moves
// forward: when every position is occupied the first stage stops consuming from
// its input (in_ready low) until a flit leaves at the output. BaBaRouter uses
// one per input port (8-bit flits, 8 deep) and, in the switch control, one
// 4-position, 3-bit FIFO per output port.
//
// The chain is written as a circular buffer with a count, which has the same
// occupancy, order and back-pressure behaviour as a self-timed chain but a
// fixed one-cycle latency from input to output (the self-timed chain's ripple
// latency is a property of the cells, not of the function).
//
// Interface: valid/ready on both sides; a word moves when valid && ready at a
// rising clock edge. out_data is the oldest word and is stable while
// out_valid && !out_ready. Synchronous active-low reset empties the buffer.
module hs_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             push, pop;

  assign in_ready  = (count != DEPTH[AW:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // The occupancy can never exceed the number of positions.
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
