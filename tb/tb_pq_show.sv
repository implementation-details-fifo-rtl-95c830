// tb_pq_show: self-checking test of the SHOW_QUEUE unit.
//
// With STEP = 3, each clock while show_queue is high the expected element is
// the one floor(t/3) mod count places behind the head, t counting clocks
// since show_queue rose; show_valid must follow show_queue and a non-empty
// queue. Heads, counts and register contents are random.
module tb_pq_show;
  import pq_pkg::*;

  localparam int DEPTH = 8;
  localparam int STEP  = 3;

  logic clk = 0, reset = 1, show_queue = 0;
  logic [2:0] head = 0;
  logic [3:0] count = 0, show_index;
  elem_t q [DEPTH];
  logic show_valid;
  elem_t show_data;
  int checks = 0, failures = 0, n_wraps = 0;

  pq_show #(.DEPTH(DEPTH), .STEP(STEP)) dut (.*);

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
    int len, j;
    for (int i = 0; i < DEPTH; i++) q[i] = '0;
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      head  = 3'($urandom);
      count = 4'($urandom_range(0, DEPTH));
      for (int i = 0; i < DEPTH; i++) q[i] = elem_t'($urandom);
      len = $urandom_range(1, 40);
      show_queue = 1;
      for (int t = 0; t < len; t++) begin
        #1;
        j = (count == 0) ? 0 : (t / STEP) % count;
        if (count != 0 && t > 0 && j == 0 && t % STEP == 0) n_wraps++;
        check(show_valid == (count != 0), "show_valid");
        if (count != 0) begin
          check(show_index == 4'(j), $sformatf("index %0d expected %0d", show_index, j));
          check(show_data == q[(head + j) % DEPTH], "shown element");
        end
        @(negedge clk);
      end
      show_queue = 0;
      #1;
      check(!show_valid, "show_valid low");
      @(negedge clk);
    end
    check(n_wraps > 0, "walk wrapped to the head");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
