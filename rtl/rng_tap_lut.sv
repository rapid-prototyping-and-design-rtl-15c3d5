// rng_tap_lut: the eight tap sets of the 32-bit LFSR.
//
// A 3-bit select picks one row; the row is returned as a 32-bit mask with a
// one at every tap position (bit 0 = least significant state bit). The LFSR
// XORs the state bits under the mask to form the bit shifted in at bit 31.
// The rows and their order are those of the design's tap table:
//   0:[31,30,28,0] 1:[31,30,4,3] 2:[31,29,7,2]  3:[31,29,6,3]
//   4:[31,28,5,4]  5:[31,28,5,3] 6:[31,25,14,6] 7:[31,30,15,1]
// The rows were chosen as maximal-length polynomials written as 1-based tap
// lists (31 standing for x^0, t for x^(t+1)). Used, as here, as 0-based state
// bit indices, which is what the design's reference output sequence shows,
// they are not maximal-length, and rows 1-7 do not use bit 0. To make them
// maximal, map 31 -> 0 and t -> t+1 (this breaks the reference sequence).
// Expressing a row as a mask, and the table as a purely combinational ROM,
// is this implementation's choice. No clock, no latency.
module rng_tap_lut
  import rng_pkg::*;
(
  input  tap_sel_t sel,   // row of the table
  output word_t    mask   // one bit per tap position
);

  typedef logic [$clog2(WORD_W)-1:0] pos_t;

  function automatic word_t taps4(pos_t a, pos_t b, pos_t c, pos_t d);
    word_t m;
    m = '0;
    m[a] = 1'b1;
    m[b] = 1'b1;
    m[c] = 1'b1;
    m[d] = 1'b1;
    return m;
  endfunction

  always_comb begin
    unique case (sel)
      3'd0: mask = taps4(31, 30, 28, 0);
      3'd1: mask = taps4(31, 30,  4, 3);
      3'd2: mask = taps4(31, 29,  7, 2);
      3'd3: mask = taps4(31, 29,  6, 3);
      3'd4: mask = taps4(31, 28,  5, 4);
      3'd5: mask = taps4(31, 28,  5, 3);
      3'd6: mask = taps4(31, 25, 14, 6);
      3'd7: mask = taps4(31, 30, 15, 1);
      default: mask = '0;
    endcase
  end

endmodule
