// pq_sevenseg: seven-segment interface showing one queue element.
//
// A 10-bit element is shown as three hexadecimal digits, the way the
// element values are written throughout this design: digit 2 is the
// priority (0..3), digits 1 and 0 the upper and lower nibble of the data.
// Each digit drives seven segments, seg[d] = {g,f,e,d,c,b,a}, active high,
// with the usual hexadecimal glyphs. When blank is high all segments are
// off. The circuit is combinational.
//
// The specification shows a seven-segment interface that displays the FIFO
// elements but gives no details: the hexadecimal format, the segment order
// and polarity and the static (not multiplexed) drive are this design's
// choices.
module pq_sevenseg
  import pq_pkg::*;
(
  input  elem_t      value,
  input  logic       blank,
  output logic [6:0] seg [3]
);

  function automatic logic [6:0] hex7(input logic [3:0] h);
    unique case (h)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      4'hF: return 7'b1110001;
    endcase
  endfunction

  logic [3:0] nib [3];

  always_comb begin
    nib[2] = {{(4 - PRIO_W){1'b0}}, value.prio};
    nib[1] = value.data[7:4];
    nib[0] = value.data[3:0];
    for (int d = 0; d < 3; d++) seg[d] = blank ? 7'b0 : hex7(nib[d]);
  end

endmodule
