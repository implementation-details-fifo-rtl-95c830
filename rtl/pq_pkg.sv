// pq_pkg: types and constants shared by the priority FIFO.
//
// A queue element is 10 bits: a 2-bit priority in bits [9:8] (0 lowest,
// 3 highest) above an 8-bit data value in bits [7:0]. This packing follows
// the element values shown in the priority-queue simulation (e.g. 10'h311 is
// priority 3, data 8'h11). The queue holds 8 elements in a circular buffer,
// so pointers are 3 bits wide.
//
// Every queue register is loaded through a 4-input mux. The order of the
// mux inputs follows the specification: hold, exchange with the left
// neighbour, exchange with the right neighbour, new element. Named by where
// the value comes from, code 1 takes the right neighbour (the element moves
// one place left) and code 2 the left neighbour (the element moves one place
// right); codes 2 and 3 are the select values the insertion state machine
// uses for its shift and for loading the new element. "Left" is towards the
// head of the queue, "right" towards the tail.
package pq_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned PRIO_W = 2;
  localparam int unsigned ELEM_W = DATA_W + PRIO_W;

  typedef struct packed {
    logic [PRIO_W-1:0] prio;
    logic [DATA_W-1:0] data;
  } elem_t;

  // Per-register mux select.
  typedef enum logic [1:0] {
    SEL_HOLD      = 2'd0,  // keep the current value
    SEL_FROM_RIGHT= 2'd1, // take the value of the right neighbour (i+1)
    SEL_FROM_LEFT = 2'd2,  // take the value of the left neighbour (i-1)
    SEL_DIN       = 2'd3   // take the new element
  } sel_t;

endpackage
