// pq_inbuf: input buffer in front of the FIFO machine.
//
// Every add request from the user (one pulse of add, however long, with the
// element taken from din on the last clock add is high) is first written
// into a small first-in first-out memory of DEPTH entries. Whenever the
// memory is not empty and the FIFO machine is idle and not full, the oldest
// buffered element is handed to the FIFO machine with a one-clock fifo_add
// pulse. While the priority queue is full, elements therefore wait here and
// enter the queue, in arrival order, as soon as a delete makes room. An add
// that finds the buffer full as well is dropped.
//
// The specification places this buffer before the FIFO and gives its job (keep
// elements that arrive while the queue is full, feed them in after a
// delete) but not its size or interface: DEPTH = 8, the drop-when-full
// rule, and routing every add through the buffer are this design's
// choices. An element that arrives while the queue has room passes through
// in two clocks (one to be written, one to be handed on).
//
// Interface: add/din from the user; fifo_idle/fifo_full from the FIFO
// machine; fifo_add/fifo_data to it; buf_full/buf_count for status.
// reset is synchronous and active high.
module pq_inbuf
  import pq_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          add,
  input  elem_t         din,
  input  logic          fifo_idle,
  input  logic          fifo_full,
  output logic          fifo_add,
  output elem_t         fifo_data,
  output logic          buf_full,
  output logic [CW-1:0] buf_count
);

  elem_t         mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          add_q;
  elem_t         din_q;
  logic          push, pop;

  // A request ends when add falls; din_q holds the value seen with add high.
  assign push      = add_q && !add && (buf_count != CW'(DEPTH));
  assign pop       = fifo_add;
  assign fifo_add  = (buf_count != 0) && fifo_idle && !fifo_full;
  assign fifo_data = mem[rd_ptr];
  assign buf_full  = (buf_count == CW'(DEPTH));

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return PW'((32'(p) + 1) % DEPTH);
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      add_q     <= 1'b0;
      din_q     <= '0;
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      buf_count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      add_q <= add;
      if (add) din_q <= din;
      if (push) begin
        mem[wr_ptr] <= din_q;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      buf_count <= buf_count + CW'(push) - CW'(pop);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (reset)
                                   fifo_add |-> buf_count != 0);

endmodule
