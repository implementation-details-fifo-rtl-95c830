// tb_pq_inbuf: self-checking test of the input buffer.
//
// The testbench drives add pulses of random length (din changing every
// clock, so the value seen on the last clock of the pulse is the one that
// counts) and plays the FIFO machine with random idle/full inputs. A
// cycle-level model predicts which requests are stored, dropped (buffer
// full) and handed on, and every clock fifo_add, fifo_data, buf_count and
// buf_full are compared with it. Handed-on elements must arrive in order.
module tb_pq_inbuf;
  import pq_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 0, reset = 1, add = 0, fifo_idle = 0, fifo_full = 0;
  elem_t din = '0, fifo_data;
  logic fifo_add, buf_full;
  logic [2:0] buf_count;
  int checks = 0, failures = 0, n_drop = 0, n_pass = 0, n_wait_full = 0;

  pq_inbuf #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    elem_t model [$];
    elem_t last;
    logic  add_q = 0;
    int    burst = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // drive this cycle's inputs
      if (burst > 0) burst--;
      else if ($urandom_range(0, 3) == 0) burst = $urandom_range(1, 4);
      add = (burst > 0);
      din = elem_t'($urandom);
      // long full phases so the buffer fills up
      if (cyc % 400 < 200) fifo_full = ($urandom_range(0, 9) != 0);
      else                 fifo_full = ($urandom_range(0, 9) == 0);
      fifo_idle = ($urandom_range(0, 3) != 0);
      #1;
      // expected outputs for this cycle
      check(buf_count == 3'(model.size()), "buf_count");
      check(buf_full == (model.size() == DEPTH), "buf_full");
      check(fifo_add == (model.size() > 0 && fifo_idle && !fifo_full), "fifo_add");
      if (model.size() > 0) check(fifo_data == model[0], "fifo_data order");
      if (model.size() > 0 && fifo_full) n_wait_full++;
      // model update at the coming edge
      if (fifo_add) begin void'(model.pop_front()); n_pass++; end
      if (add_q && !add) begin
        // the full test uses the fill level before this clock's hand-on
        if (buf_count != 3'(DEPTH)) model.push_back(last);
        else n_drop++;
      end
      add_q = add;
      if (add) last = din;
      @(negedge clk);
    end
    check(n_drop > 0, "requests dropped with the buffer full");
    check(n_wait_full > 0, "elements waited while the queue was full");
    check(n_pass > 0, "elements handed on");
    $display("passed=%0d dropped=%0d", n_pass, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
