// pq_fifo: the FIFO machine, a priority queue of DEPTH 10-bit elements.
//
// Elements sit in a ring of registers (pq_regfile) between a head pointer
// (oldest, highest-priority element, always shown on data_out) and a tail
// pointer (next free register); full and empty flags tell the two cases
// head == tail apart. Priorities run 0..3, 3 highest. A new element is
// placed behind the last element of equal or higher priority: a
// sub-counter starts at the tail and walks towards the head, moving each
// lower-priority element one place to the right, until it meets an element
// of equal or higher priority or reaches the head; the new element is
// written there and the tail advances. A delete advances the head. An add
// to a full queue or a delete from an empty one is ignored.
//
// Main state machine (state names S1..S13 are those of the specification):
//   S1  idle. add & !full -> S6; del & !add & !empty -> S2;
//       sort & !add & !del -> SORT (this design's addition, see below).
//   S2  advance head, clear full          -> S3
//   S3  wait while del is high            -> S4 when del falls
//   S4  head == tail ? S5 : S1
//   S5  set empty                         -> S1
//   S6  clear empty, latch din while add is high; -> S7 when add falls
//   S7  load sub-counter with tail        -> S8
//   S8  compare: element left of the sub-counter has lower priority (lp)
//       and sub-counter is not at head (!seh) ? S10 : S9
//   S10 shift that element right (mux code 2), sub-counter - 1 -> S8
//   S9  write the new element at the sub-counter (mux code 3) -> S11
//   S11 advance tail                      -> S12
//   S12 head == tail ? S13 : S1
//   S13 set full                          -> S1
// An add therefore finishes 5 + 2k clocks after add falls (k elements
// moved), one more when it fills the queue. A delete moves the head on the
// first clock edge that sees del high (S1 -> S2); once del has fallen the
// machine is back in S1 after S3 -> S4 -> S1, plus S5 when the queue
// empties.
//
// The states, transitions and actions above follow the specification. Sorting
// and SHOW_QUEUE were not part of its state machine: here SORT starts
// pq_sorter from S1, eoc rises when the sort is finished and falls after
// sort is dropped (the EOC handshake of the specification). pq_show runs beside
// the state machine. The element is latched whenever add is high in S1 or
// S6, so a one-clock add pulse works too; where din is sampled is this
// design's choice. reset is synchronous and active high.
module pq_fifo
  import pq_pkg::*;
#(
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned SHOW_STEP = 1,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          add,
  input  logic          del,
  input  logic          sort,
  input  logic          show_queue,
  input  elem_t         din,
  output elem_t         data_out,
  output logic          full,
  output logic          empty,
  output logic          eoc,
  output logic          idle,        // state machine in S1
  output logic [CW-1:0] count,       // number of stored elements
  output logic          show_valid,
  output logic [CW-1:0] show_index,
  output elem_t         show_data
);

  typedef enum logic [3:0] {
    S1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11, S12, S13, S_SORT, S_EOC
  } state_t;

  state_t        state, state_n;
  logic [PW-1:0] head, tail, subcount;
  elem_t         in_reg;
  elem_t         q [DEPTH];
  sel_t          sel [DEPTH];
  logic          lp, seh, eq;
  logic [PW-1:0] sc_left;

  logic          sort_start, sort_busy, sort_swap, sort_done;
  logic [PW-1:0] sort_pos;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return PW'((32'(p) + 1) % DEPTH);
  endfunction

  function automatic logic [PW-1:0] dec(input logic [PW-1:0] p);
    return PW'((32'(p) + DEPTH - 1) % DEPTH);
  endfunction

  assign sc_left = dec(subcount);
  assign lp      = (q[sc_left].prio < in_reg.prio);
  assign seh     = (subcount == head);
  assign eq      = (head == tail);

  // Next-state logic.
  always_comb begin
    state_n = state;
    unique case (state)
      S1: begin
        if (add && !full)                state_n = S6;
        else if (del && !add && !empty)  state_n = S2;
        else if (sort && !add && !del)   state_n = S_SORT;
      end
      S2:  state_n = S3;
      S3:  if (!del) state_n = S4;
      S4:  state_n = eq ? S5 : S1;
      S5:  state_n = S1;
      S6:  if (!add) state_n = S7;
      S7:  state_n = S8;
      S8:  state_n = (lp && !seh) ? S10 : S9;
      S10: state_n = S8;
      S9:  state_n = S11;
      S11: state_n = S12;
      S12: state_n = eq ? S13 : S1;
      S13: state_n = S1;
      S_SORT: if (sort_done) state_n = S_EOC;
      S_EOC:  if (!sort) state_n = S1;
      default: state_n = S1;
    endcase
  end

  // Register mux selects, decoded from the state machine.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) sel[i] = SEL_HOLD;
    if (state == S10) sel[subcount] = SEL_FROM_LEFT;
    if (state == S9)  sel[subcount] = SEL_DIN;
    if (state == S_SORT && sort_swap) begin
      sel[sort_pos]      = SEL_FROM_RIGHT;
      sel[inc(sort_pos)] = SEL_FROM_LEFT;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= S1;
      head     <= '0;
      tail     <= '0;
      subcount <= '0;
      full     <= 1'b0;
      empty    <= 1'b1;
      in_reg   <= '0;
      count    <= '0;
    end else begin
      state <= state_n;
      if (add && (state == S1 || state == S6)) in_reg <= din;
      unique case (state)
        S2:  begin head <= inc(head); full <= 1'b0; count <= count - 1'b1; end
        S5:  empty <= 1'b1;
        S6:  empty <= 1'b0;
        S7:  subcount <= tail;
        S10: subcount <= dec(subcount);
        S11: begin tail <= inc(tail); count <= count + 1'b1; end
        S13: full <= 1'b1;
        default: ;
      endcase
    end
  end

  assign sort_start = (state == S1) && (state_n == S_SORT);
  assign eoc        = (state == S_EOC);
  assign idle       = (state == S1);
  assign data_out   = q[head];

  pq_regfile #(.DEPTH(DEPTH)) u_regs (
    .clk, .reset, .sel, .din(in_reg), .q
  );

  pq_sorter #(.DEPTH(DEPTH)) u_sorter (
    .clk, .reset, .start(sort_start), .head, .count, .q,
    .busy(sort_busy), .swap(sort_swap), .swap_pos(sort_pos), .done(sort_done)
  );

  pq_show #(.DEPTH(DEPTH), .STEP(SHOW_STEP)) u_show (
    .clk, .reset, .show_queue, .head, .count, .q,
    .show_valid, .show_index, .show_data
  );

  // The ring never holds more than DEPTH elements, and the flags agree
  // with the element count.
  a_count: assert property (@(posedge clk) disable iff (reset) count <= CW'(DEPTH));
  a_empty: assert property (@(posedge clk) disable iff (reset)
                            (state == S1) |-> (empty == (count == 0)));
  a_full:  assert property (@(posedge clk) disable iff (reset)
                            (state == S1) |-> (full == (count == CW'(DEPTH))));
  a_sort:  assert property (@(posedge clk) disable iff (reset)
                            (state == S_SORT) |-> (sort_busy || sort_done));

endmodule
