// pq_sorter: sorts the queue by data value within each priority level.
//
// The queue is always ordered by decreasing priority, so each run of equal
// priority is a small queue of its own; the sorter orders every such run by
// ascending data value and leaves the priority order alone. It is a bubble
// sort that reuses the neighbour-swap inputs of the register muxes: every
// clock it looks at one adjacent pair (logical positions j and j+1 counted
// from the head) and, if both have the same priority and the left data is
// larger, asks for a swap. Passes repeat until one makes no swap.
//
// The specification asks only that elements of equal priority be put in
// order of their data; the bubble-sort method, the ascending order and one pair per
// clock are this design's choices.
//
// Interface: pulse start for one clock while the queue is not changing.
// busy is high while sorting; swap/swap_pos request a swap of physical
// registers swap_pos and swap_pos+1 (mod DEPTH) at the next clock edge;
// done pulses for one clock when the queue is sorted. A sort of n >= 2
// elements takes at most n passes of n-1 clocks (the last pass finds
// nothing to swap) plus two clocks from start to done; fewer than two
// elements take two clocks.
module pq_sorter
  import pq_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic [PW-1:0] head,
  input  logic [CW-1:0] count,
  input  elem_t         q [DEPTH],
  output logic          busy,
  output logic          swap,
  output logic [PW-1:0] swap_pos,
  output logic          done
);

  logic [CW-1:0] j;        // logical index of the left element of the pair
  logic          swapped;  // a swap happened earlier in this pass
  logic [PW-1:0] pos_r;
  elem_t         a, b;
  logic          last_pair;

  // Physical positions wrap naturally when DEPTH is a power of two; the
  // modulo keeps other depths correct.
  always_comb begin
    pos_r     = PW'((32'(head) + 32'(j)) % DEPTH);
    a         = q[pos_r];
    b         = q[PW'((32'(pos_r) + 1) % DEPTH)];
    last_pair = (32'(j) + 2 >= 32'(count));
    swap      = busy && (count >= 2) && (a.prio == b.prio) && (a.data > b.data);
    swap_pos  = pos_r;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      j       <= '0;
      swapped <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          j       <= '0;
          swapped <= 1'b0;
        end
      end else if (count < 2) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (last_pair) begin
        if (swapped || swap) begin
          j       <= '0;
          swapped <= 1'b0;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else begin
        j       <= j + 1'b1;
        swapped <= swapped || swap;
      end
    end
  end

endmodule
