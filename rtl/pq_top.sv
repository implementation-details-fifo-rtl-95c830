// pq_top: priority FIFO with input buffer and seven-segment display.
//
// The user presents an element on data_in (priority in bits [9:8], data in
// bits [7:0]) and pulses add; pulses del to remove the head; raises sort to
// order each priority level by data value (eoc answers, sort is then
// dropped); holds show_queue to step the display through the queue from the
// head. Added elements pass through pq_inbuf, which keeps them while the
// queue is full, into pq_fifo, the 8-entry priority queue. data_out is
// always the head of the queue; full and empty describe the queue itself.
// The seven-segment digits show the element picked by show_queue while it
// is high (its position from the head on show_index) and the head
// otherwise, blank when the queue is empty.
//
// The partition (buffer, FIFO, seven-segment interface; keyboard and input
// module outside, with add/data_in standing for their Valid and Data Value)
// and the port list follow the specification's block diagram. Buffer depth,
// display format and show step rate are this design's choices.
module pq_top
  import pq_pkg::*;
#(
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned SHOW_STEP = 1,
  localparam int unsigned CW  = $clog2(DEPTH + 1),
  localparam int unsigned BCW = $clog2(BUF_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              add,
  input  logic              del,
  input  logic              sort,
  input  logic              show_queue,
  input  logic [ELEM_W-1:0] data_in,
  output logic [ELEM_W-1:0] data_out,
  output logic              full,
  output logic              empty,
  output logic              eoc,
  output logic              buf_full,
  output logic [BCW-1:0]    buf_count,
  output logic [CW-1:0]     count,
  output logic [CW-1:0]     show_index,
  output logic [6:0]        seg [3]
);

  logic  fifo_add, fifo_idle;
  elem_t fifo_data, head_elem, show_data, disp;
  logic  show_valid;

  pq_inbuf #(.DEPTH(BUF_DEPTH)) u_inbuf (
    .clk, .reset, .add, .din(elem_t'(data_in)),
    .fifo_idle, .fifo_full(full),
    .fifo_add, .fifo_data, .buf_full, .buf_count
  );

  pq_fifo #(.DEPTH(DEPTH), .SHOW_STEP(SHOW_STEP)) u_fifo (
    .clk, .reset, .add(fifo_add), .del, .sort, .show_queue,
    .din(fifo_data), .data_out(head_elem), .full, .empty, .eoc,
    .idle(fifo_idle), .count, .show_valid, .show_index, .show_data
  );

  assign data_out = head_elem;
  assign disp     = show_valid ? show_data : head_elem;

  pq_sevenseg u_seg (
    .value(disp), .blank(empty), .seg
  );

endmodule
