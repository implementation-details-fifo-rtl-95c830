// tb_pq_sorter: self-checking test of the within-priority sorter.
//
// The testbench plays the register ring: it holds DEPTH elements, applies
// every swap the sorter asks for at the clock edge, and after done compares
// the queue window (count elements from head, wrapping) with a reference
// sort: stable, by ascending data, only among neighbours of equal priority.
// Registers outside the window must not change. Each sort must also end
// within count*(count-1) + 2 clocks (2 for fewer than two elements).
module tb_pq_sorter;
  import pq_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 0, reset = 1, start = 0;
  logic [2:0] head;
  logic [3:0] count;
  elem_t q [DEPTH];
  logic busy, swap, done;
  logic [2:0] swap_pos;
  int checks = 0, failures = 0, n_swaps = 0;

  pq_sorter dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (swap) begin
      elem_t t;
      t = q[swap_pos];
      q[swap_pos] <= q[(swap_pos + 1) % DEPTH];
      q[(swap_pos + 1) % DEPTH] <= t;
      n_swaps++;
    end

  initial begin
    repeat (200000) @(posedge clk);
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
    elem_t exp [DEPTH];
    elem_t w [$];
    elem_t t;
    int cyc;
    head = 0; count = 0;
    for (int i = 0; i < DEPTH; i++) q[i] = '0;
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int it = 0; it < 400; it++) begin
      // a queue in decreasing priority order, few priorities, small data
      head = 3'($urandom);
      count = 4'($urandom_range(0, DEPTH));
      for (int i = 0; i < DEPTH; i++) q[i] = elem_t'($urandom);
      w.delete();
      for (int j = 0; j < count; j++) begin
        t = elem_t'($urandom_range(0, 1023));
        w.push_back(t);
      end
      w.sort() with (item.prio);
      w.reverse();
      for (int j = 0; j < count; j++) q[(head + j) % DEPTH] = w[j];
      // reference
      for (int a = 0; a < w.size(); a++)
        for (int b = 0; b + 1 < w.size() - a; b++)
          if (w[b].prio == w[b+1].prio && w[b].data > w[b+1].data) begin
            t = w[b]; w[b] = w[b+1]; w[b+1] = t;
          end
      exp = q;
      for (int j = 0; j < count; j++) exp[(head + j) % DEPTH] = w[j];
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      check(done, "done");
      check(cyc <= ((count < 2) ? 2 : int'(count) * (int'(count) - 1) + 2),
            $sformatf("sort time %0d for %0d elements", cyc, count));
      @(negedge clk);
      check(!busy, "idle after done");
      for (int i = 0; i < DEPTH; i++)
        check(q[i] == exp[i], $sformatf("register %0d", i));
    end
    check(n_swaps > 0, "swaps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
