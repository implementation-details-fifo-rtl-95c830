// pq_regfile: the queue storage, a ring of DEPTH element registers.
//
// Each register i is loaded every clock through its own 4-input mux,
// selected by sel[i]: hold, take the right neighbour (i+1 mod DEPTH), take
// the left neighbour (i-1 mod DEPTH) or take din. Shifting an element one
// place towards the tail is a single register selecting its left
// neighbour; swapping two adjacent elements is the left one selecting its
// right neighbour while the right one selects its left neighbour, in the
// same clock. The ring of 8 registers and the four mux inputs follow the
// specification; the wrap-around at the ends is this design's reading of the
// circular queue.
//
// Timing: writes take effect at the rising clock edge; q shows all
// registers. reset (synchronous, active high) clears every register.
module pq_regfile
  import pq_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  reset,
  input  sel_t  sel [DEPTH],
  input  elem_t din,
  output elem_t q   [DEPTH]
);

  elem_t regs [DEPTH];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        unique case (sel[i])
          SEL_HOLD:       regs[i] <= regs[i];
          SEL_FROM_RIGHT: regs[i] <= regs[(i + 1) % DEPTH];
          SEL_FROM_LEFT:  regs[i] <= regs[(i + DEPTH - 1) % DEPTH];
          SEL_DIN:        regs[i] <= din;
        endcase
      end
    end
  end

  assign q = regs;

endmodule
