// vc_fifo: the buffer of one virtual channel of a router input port.
//
// A circular buffer of DEPTH entries of WIDTH bits with a registered head:
// rdata always shows the oldest entry, so a word written in cycle t can be
// read in cycle t+1. push and pop may happen in the same cycle, also when
// the buffer is full (the pop frees the slot). Asynchronous active-low
// reset empties it.
//
// In the FTSECDED input port two of these sit side by side: VC1 holds the
// data of each flit and VC0, otherwise idle, holds its check bits. The
// depth is not given by the document and is this design's choice.
module vc_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;

  logic do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rdata   = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage needs no reset: nothing reads an entry before it is written.
  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  // Flow-control rules of the buffer.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("vc_fifo: push into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("vc_fifo: pop from an empty buffer");

endmodule
