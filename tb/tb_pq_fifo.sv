// tb_pq_fifo: self-checking test of the FIFO machine.
//
// A reference model (a SystemVerilog queue kept in priority order) is
// updated with every add, delete and sort and compared with data_out, full,
// empty, count and, through SHOW_QUEUE, with every stored element. The
// number of clocks an add takes after add falls is checked against
// 5 + 2k (+1 when the queue becomes full), k being the elements moved.
// Random traffic covers adds to a full queue, deletes from an empty one and
// sorts of partly sorted queues.
module tb_pq_fifo;
  import pq_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 0, reset = 1, add = 0, del = 0, sort = 0, show_queue = 0;
  elem_t din = '0, data_out, show_data;
  logic full, empty, eoc, idle, show_valid;
  logic [3:0] count, show_index;

  int checks = 0, failures = 0;
  elem_t model [$];
  int n_shift = 0, n_full_ign = 0, n_empty_ign = 0, n_sort_swap = 0;

  pq_fifo dut (.*);

  always #5 clk = ~clk;

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

  task automatic check_state();
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    check(count == 4'(model.size()), "count");
    if (model.size() > 0) check(data_out == model[0], "data_out is head");
  endtask

  // Walk the queue with SHOW_QUEUE and compare every element.
  task automatic check_contents();
    if (model.size() == 0) return;
    show_queue = 1;
    #1;
    for (int j = 0; j < model.size(); j++) begin
      check(show_valid && show_index == 4'(j), "show index");
      check(show_data == model[j], $sformatf("element %0d", j));
      @(posedge clk); #1;
    end
    check(show_index == 0, "show wraps to head");
    show_queue = 0;
    @(posedge clk); #1;
  endtask

  function automatic int model_pos(elem_t e);
    int p = model.size();
    while (p > 0 && model[p-1].prio < e.prio) p--;
    return p;
  endfunction

  task automatic do_add(input elem_t e, input int hold);
    int k, cyc;
    bit was_full;
    was_full = (model.size() == DEPTH);
    din <= e; add <= 1;
    repeat (hold) @(posedge clk);
    add <= 0;
    din <= elem_t'($urandom);   // din need not stay valid after add falls
    @(posedge clk); #1;
    cyc = 0;
    while (!idle && cyc < 100) begin @(posedge clk); #1; cyc++; end
    if (was_full) begin
      n_full_ign++;
      check(cyc == 0, "add to full queue ignored");
    end else begin
      k = model.size() - model_pos(e);
      n_shift += k;
      model.insert(model_pos(e), e);
      check(cyc == 5 + 2*k + ((model.size() == DEPTH) ? 1 : 0),
            $sformatf("add latency %0d k=%0d", cyc, k));
    end
    check_state();
  endtask

  task automatic do_del(input int hold);
    int cyc;
    bit was_empty;
    was_empty = (model.size() == 0);
    del <= 1;
    repeat (hold) @(posedge clk);
    del <= 0;
    @(posedge clk); #1;
    cyc = 0;
    while (!idle && cyc < 100) begin @(posedge clk); #1; cyc++; end
    if (was_empty) begin
      n_empty_ign++;
      check(cyc == 0, "delete from empty queue ignored");
    end else begin
      void'(model.pop_front());
      // S2 is entered on the clock edge after del rises; S3 waits for del
      // to fall, then S4 (and S5 when the queue empties) close the delete.
      check(cyc == ((hold == 1) ? 2 : 1) + ((model.size() == 0) ? 1 : 0),
            $sformatf("delete latency %0d", cyc));
    end
    check_state();
  endtask

  task automatic do_sort();
    int cyc = 0;
    elem_t t;
    // reference: bubble each priority run into ascending data order
    for (int a = 0; a < model.size(); a++)
      for (int b = 0; b + 1 < model.size() - a; b++)
        if (model[b].prio == model[b+1].prio && model[b].data > model[b+1].data) begin
          t = model[b]; model[b] = model[b+1]; model[b+1] = t; n_sort_swap++;
        end
    sort <= 1;
    @(posedge clk); #1;
    while (!eoc && cyc < 200) begin @(posedge clk); #1; cyc++; end
    check(eoc, "eoc after sort");
    check(cyc <= DEPTH * DEPTH + 2, "sort time bound");
    @(posedge clk); #1;
    check(eoc, "eoc held while sort high");
    sort <= 0;
    @(posedge clk); #1;
    check(!eoc && idle, "eoc falls after sort drops");
    check_state();
    check_contents();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk); #1;
    check_state();
    // The insertion sequence of the priority-queue waveform example.
    do_add(10'h311, 3); do_add(10'h322, 2); do_add(10'h022, 2);
    do_add(10'h311, 1); do_add(10'h201, 2); do_add(10'h203, 2);
    do_add(10'h101, 1); check_contents();
    do_add(10'h301, 2); check_contents();
    check(full, "queue full after 8 adds");
    do_add(10'h3FF, 2);   // ignored
    check_contents();
    do_sort();
    repeat (DEPTH + 1) do_del($urandom_range(1, 3));   // last one ignored
    do_sort();           // empty queue
    // Random traffic.
    for (int it = 0; it < 600; it++) begin
      automatic int r = $urandom_range(0, 99);
      if (r < 50) do_add(elem_t'($urandom), $urandom_range(1, 3));
      else if (r < 85) do_del($urandom_range(1, 3));
      else if (r < 92) do_sort();
      else check_contents();
    end
    check(n_shift > 0, "inserts that moved elements happened");
    check(n_full_ign > 0, "adds to a full queue happened");
    check(n_empty_ign > 0, "deletes from an empty queue happened");
    check(n_sort_swap > 0, "sorts that swapped happened");
    $display("shifts=%0d full_ignored=%0d empty_ignored=%0d sort_swaps=%0d",
             n_shift, n_full_ign, n_empty_ign, n_sort_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
