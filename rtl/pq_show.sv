// pq_show: SHOW_QUEUE unit, presents the queue elements one at a time.
//
// While show_queue is high the unit walks through the stored elements in
// queue order, starting at the head, holding each for STEP clocks and
// wrapping from the last element back to the head. show_data is the element
// being shown, show_index its position counted from the head (0 = head) and
// show_valid is high while show_queue is high and the queue is not empty.
// Dropping show_queue returns the walk to the head.
//
// The specification asks only that SHOW_QUEUE present every element in
// turn, beginning at the head; the step period STEP (1 clock by default, to be
// raised for a human-readable display) and the wrap-around are this
// design's choices.
module pq_show
  import pq_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned STEP  = 1,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned TW = (STEP > 1) ? $clog2(STEP) : 1
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          show_queue,
  input  logic [PW-1:0] head,
  input  logic [CW-1:0] count,
  input  elem_t         q [DEPTH],
  output logic          show_valid,
  output logic [CW-1:0] show_index,
  output elem_t         show_data
);

  logic [CW-1:0] idx;
  logic [TW-1:0] timer;

  always_ff @(posedge clk) begin
    if (reset || !show_queue) begin
      idx   <= '0;
      timer <= '0;
    end else if (32'(timer) + 1 >= STEP) begin
      timer <= '0;
      if (32'(idx) + 1 >= 32'(count)) idx <= '0;
      else                            idx <= idx + 1'b1;
    end else begin
      timer <= timer + 1'b1;
    end
  end

  assign show_valid = show_queue && (count != 0);
  assign show_index = idx;
  assign show_data  = q[PW'((32'(head) + 32'(idx)) % DEPTH)];

endmodule
