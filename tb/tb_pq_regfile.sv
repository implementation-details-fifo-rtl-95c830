// tb_pq_regfile: self-checking test of the queue register ring.
//
// Random select vectors and data drive the ring; a model array updated
// from the previous register values (hold, right neighbour, left
// neighbour, din, with wrap-around) is compared with q after every clock.
module tb_pq_regfile;
  import pq_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 0, reset = 1;
  sel_t sel [DEPTH];
  elem_t din;
  elem_t q [DEPTH];
  elem_t model [DEPTH], prev [DEPTH];
  int checks = 0, failures = 0;

  pq_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin sel[i] = SEL_HOLD; model[i] = '0; end
    din = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (q[i] !== '0) failures++;
    end
    for (int it = 0; it < 2000; it++) begin
      for (int i = 0; i < DEPTH; i++) sel[i] = sel_t'($urandom_range(0, 3));
      din = elem_t'($urandom);
      prev = model;
      for (int i = 0; i < DEPTH; i++)
        case (sel[i])
          SEL_HOLD:       model[i] = prev[i];
          SEL_FROM_RIGHT: model[i] = prev[(i + 1) % DEPTH];
          SEL_FROM_LEFT:  model[i] = prev[(i + DEPTH - 1) % DEPTH];
          default:        model[i] = din;
        endcase
      @(posedge clk); #1;
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (q[i] != model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL reg %0d: %h expected %h", i, q[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
