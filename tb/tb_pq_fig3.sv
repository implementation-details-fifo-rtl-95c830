// tb_pq_fig3: replays the reference priority-queue scenario on pq_fifo.
//
// Seven elements are added (301, 322, 022, 311, 201, 203, 101: priority in
// the leading hex digit) and two deleted. The expected end state is the
// recorded one of the reference simulation: registers 0..7 hold 301, 322,
// 311, 201, 203, 101, 022, 000, the head pointer is 2 and the tail pointer
// 7, so the queue reads 311, 201, 203, 101, 022 from the head. The test also
// checks the queue order after the adds and the clock count of each add
// (5 + 2k after add falls, k elements moved). It looks at the register ring
// and the pointers through hierarchical references.
module tb_pq_fig3;
  import pq_pkg::*;

  logic clk = 0, reset = 1, add = 0, del = 0, sort = 0, show_queue = 0;
  elem_t din = '0, data_out, show_data;
  logic full, empty, eoc, idle, show_valid;
  logic [3:0] count, show_index;
  int checks = 0, failures = 0;

  pq_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_add(input elem_t e, input int k);
    int cyc = 0;
    din <= e; add <= 1;
    repeat (3) @(posedge clk);
    add <= 0;
    @(posedge clk); #1;
    while (!idle && cyc < 100) begin @(posedge clk); #1; cyc++; end
    check(cyc == 5 + 2 * k, $sformatf("add %h took %0d clocks", e, cyc));
  endtask

  task automatic do_del();
    del <= 1;
    repeat (2) @(posedge clk);
    del <= 0;
    repeat (5) @(posedge clk);
    #1;
  endtask

  localparam elem_t AFTER_ADDS [7] = '{10'h301, 10'h322, 10'h311, 10'h201,
                                       10'h203, 10'h101, 10'h022};
  localparam elem_t REGS_END   [8] = '{10'h301, 10'h322, 10'h311, 10'h201,
                                       10'h203, 10'h101, 10'h022, 10'h000};

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    do_add(10'h301, 0);
    do_add(10'h322, 0);
    do_add(10'h022, 0);
    do_add(10'h311, 1);
    do_add(10'h201, 1);
    do_add(10'h203, 1);
    do_add(10'h101, 1);
    for (int i = 0; i < 7; i++)
      check(dut.q[i] == AFTER_ADDS[i], $sformatf("register %0d after adds", i));
    do_del();
    do_del();
    for (int i = 0; i < 8; i++)
      check(dut.q[i] == REGS_END[i], $sformatf("register %0d at end", i));
    check(dut.head == 3'd2, "head pointer 2");
    check(dut.tail == 3'd7, "tail pointer 7");
    check(count == 4'd5 && !full && !empty, "five elements left");
    check(data_out == 10'h311, "data_out is head 311");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
