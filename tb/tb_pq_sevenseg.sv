// tb_pq_sevenseg: exhaustive test of the seven-segment interface.
//
// Every 10-bit element value is applied with blank low and high. The
// expected segments are built segment by segment from the list of
// hexadecimal digits that light each segment, not from a per-digit table.
module tb_pq_sevenseg;
  import pq_pkg::*;

  elem_t value;
  logic blank;
  logic [6:0] seg [3];
  int checks = 0, failures = 0;

  pq_sevenseg dut (.*);

  // Digits on which a segment stays dark (for e: on which it lights).
  function automatic logic [6:0] ref7(input int h);
    logic [6:0] s;
    s[0] = !(h inside {1, 4, 11, 13});              // a
    s[1] = !(h inside {5, 6, 11, 12, 14, 15});      // b
    s[2] = !(h inside {2, 12, 14, 15});             // c
    s[3] = !(h inside {1, 4, 7, 10, 15});           // d
    s[4] =  (h inside {0, 2, 6, 8, 10, 11, 12, 13, 14, 15}); // e
    s[5] = !(h inside {1, 2, 3, 7, 13});            // f
    s[6] = !(h inside {0, 1, 7, 12});               // g
    return s;
  endfunction

  initial begin
    for (int b = 0; b < 2; b++)
      for (int v = 0; v < 1024; v++) begin
        value = elem_t'(v);
        blank = b[0];
        #1;
        for (int d = 0; d < 3; d++) begin
          logic [6:0] e;
          e = blank ? 7'b0 : ref7((v >> (4 * d)) & 4'hF);
          checks++;
          if (seg[d] != e) begin
            failures++;
            if (failures < 10) $display("FAIL value %h digit %0d: %b expected %b", v, d, seg[d], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
