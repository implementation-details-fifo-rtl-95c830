// tb_pq_top: end-to-end test of the priority FIFO with its input buffer
// and seven-segment display, at the default sizes (8-element queue,
// 8-entry buffer).
//
// A transaction-level model holds the priority queue and the buffer in
// front of it: an add goes straight into the queue when it has room, into
// the buffer when the queue is full, and is lost when both are full; each
// delete removes the head and then lets the oldest buffered element into
// the queue. After every operation the testbench waits until the design
// has settled and compares data_out, full, empty, count, buf_count, the
// three display digits, and (by holding show_queue) every element shown.
// It counts each mechanism the design has and fails if one never occurs:
// inserts that move elements, adds buffered because the queue was full,
// adds dropped with the buffer full, buffered elements fed in after a
// delete, deletes on an empty queue, sorts that reorder elements, and
// SHOW_QUEUE walks.
module tb_pq_top;
  import pq_pkg::*;

  localparam int DEPTH = 8, BUF_DEPTH = 8;

  logic clk = 0, reset = 1, add = 0, del = 0, sort = 0, show_queue = 0;
  logic [9:0] data_in = '0, data_out;
  logic full, empty, eoc, buf_full;
  logic [3:0] buf_count, count, show_index;
  logic [6:0] seg [3];

  pq_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_shift = 0, n_buffered = 0, n_dropped = 0, n_fed = 0, n_del_empty = 0;
  int n_sort = 0, n_show = 0, n_del = 0;
  elem_t q [$], b [$];

  initial begin
    repeat (300000) @(posedge clk);
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

  function automatic logic [6:0] ref7(input int h);
    logic [6:0] s;
    s[0] = !(h inside {1, 4, 11, 13});
    s[1] = !(h inside {5, 6, 11, 12, 14, 15});
    s[2] = !(h inside {2, 12, 14, 15});
    s[3] = !(h inside {1, 4, 7, 10, 15});
    s[4] =  (h inside {0, 2, 6, 8, 10, 11, 12, 13, 14, 15});
    s[5] = !(h inside {1, 2, 3, 7, 13});
    s[6] = !(h inside {0, 1, 7, 12});
    return s;
  endfunction

  task automatic check_seg(input elem_t e, input string what);
    for (int d = 0; d < 3; d++)
      check(seg[d] == ref7((int'(e) >> (4 * d)) & 15), what);
  endtask

  function automatic void model_insert(elem_t e);
    int p = q.size();
    while (p > 0 && q[p-1].prio < e.prio) p--;
    if (p < q.size()) n_shift++;
    q.insert(p, e);
  endfunction

  // Wait long enough for any operation to finish: the longest is a delete
  // that lets a buffered element in, which then moves 7 elements
  // (3 + 2 + 5 + 2*7 + 1 clocks).
  task automatic settle();
    repeat (30) @(posedge clk);
    #1;
  endtask

  task automatic check_state();
    check(count == 4'(q.size()), "queue count");
    check(buf_count == 4'(b.size()), "buffer count");
    check(full == (q.size() == DEPTH), "full");
    check(empty == (q.size() == 0), "empty");
    check(buf_full == (b.size() == BUF_DEPTH), "buf_full");
    if (q.size() > 0) begin
      check(data_out == q[0], "data_out is head");
      check_seg(q[0], "display shows head");
    end else begin
      for (int d = 0; d < 3; d++) check(seg[d] == 7'b0, "display blank");
    end
  endtask

  task automatic do_add(input elem_t e);
    data_in <= e; add <= 1;
    repeat ($urandom_range(1, 3)) @(posedge clk);
    add <= 0; data_in <= '0;
    if (q.size() < DEPTH && b.size() == 0) model_insert(e);
    else if (b.size() < BUF_DEPTH) begin b.push_back(e); n_buffered++; end
    else n_dropped++;
    settle();
    check_state();
  endtask

  task automatic do_del();
    del <= 1;
    repeat ($urandom_range(1, 3)) @(posedge clk);
    del <= 0;
    if (q.size() == 0) n_del_empty++;
    else begin
      void'(q.pop_front());
      n_del++;
      if (b.size() > 0) begin model_insert(b.pop_front()); n_fed++; end
    end
    settle();
    check_state();
  endtask

  task automatic do_sort();
    elem_t t;
    bit moved = 0;
    int n = 0;
    for (int a = 0; a < q.size(); a++)
      for (int i = 0; i + 1 < q.size() - a; i++)
        if (q[i].prio == q[i+1].prio && q[i].data > q[i+1].data) begin
          t = q[i]; q[i] = q[i+1]; q[i+1] = t; moved = 1;
        end
    if (moved) n_sort++;
    sort <= 1;
    do begin @(posedge clk); #1; n++; end while (!eoc && n < 200);
    check(eoc, "eoc");
    sort <= 0;
    @(posedge clk); #1;
    check(!eoc, "eoc falls");
    settle();
    check_state();
  endtask

  task automatic do_show();
    if (q.size() == 0) return;
    n_show++;
    show_queue = 1;
    #1;
    for (int j = 0; j < 2 * q.size(); j++) begin
      check(show_index == 4'(j % q.size()), "show index");
      check_seg(q[j % q.size()], "display shows element");
      @(posedge clk); #1;
    end
    show_queue = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    settle();
    check_state();
    for (int it = 0; it < 1500; it++) begin
      int r;
      // phases that lean towards adding, then towards deleting
      r = $urandom_range(0, 99) + (((it / 100) % 2) ? 20 : -20);
      if (r < 45) do_add(elem_t'($urandom));
      else if (r < 85) do_del();
      else if (r < 93) do_sort();
      else do_show();
    end
    check(n_shift > 0, "inserts moved elements");
    check(n_buffered > 0, "adds buffered with the queue full");
    check(n_dropped > 0, "adds dropped with the buffer full");
    check(n_fed > 0, "buffered elements fed after a delete");
    check(n_del > 0, "deletes");
    check(n_del_empty > 0, "deletes on an empty queue");
    check(n_sort > 0, "sorts that reordered elements");
    check(n_show > 0, "SHOW_QUEUE walks");
    $display("shift=%0d buffered=%0d dropped=%0d fed=%0d del=%0d del_empty=%0d sort=%0d show=%0d",
             n_shift, n_buffered, n_dropped, n_fed, n_del, n_del_empty, n_sort, n_show);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
