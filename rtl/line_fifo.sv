// line_fifo: one CCD row of parity-coded pixels (DEPTH x WIDTH, 512 x 9 by
// default, as in the document's CCD interface).
//
// A circular array with read and write pointers and an occupancy count.
// dout always shows the oldest word (valid when empty is low). push and pop
// may be given in the same cycle, also when the buffer is full, which is how
// the CCD interface uses it as a one-row delay. flush empties it. Pushing a
// full buffer without popping, or popping an empty one, is a usage error and
// is caught by assertions. The memory is not reset; only words that were
// written are ever read.
module line_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= nxt(wr_ptr);
      if (pop)  rd_ptr <= nxt(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || flush) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || flush) !(pop && empty));
endmodule
