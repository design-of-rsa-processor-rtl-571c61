// nikhilam_mult: Nikhilam ("all from nine, last from ten") multiplier.
//
// Nikhilam multiplies two numbers through their deviations from a common
// base B: x*y = (x + (y - B)) * B + (x - B) * (y - B). With B a power of two
// the first term is a cross-addition and a shift, and the second term is a
// smaller multiplication that is handled the same way, level after level.
//
// At each level the operands are ordered so that x >= y, the base is the
// largest power of two not above y (B = 2^k), the level contributes
// (x + y - B) << k, and the deviations x - B, y - B go to the next level.
// The smaller deviation is below 2^k, so k falls at every level and W levels
// always finish the product; a level whose smaller operand is 0 adds nothing.
// Example (12 x 12): B = 8, deviations 4 and 4, 16*8 + 4*4 = 144.
// Example (20 x 10): B = 8 -> 22*8 = 176, deviations 12, 2; B = 2 -> 12*2 =
// 24, deviations 10, 0; total 200. These are the values the three recursion
// levels (x1/y1, x2/y2, x3/y3) of the reference 8-bit waveform carry.
//
// Interface: purely combinational, res = x*y. The choice of base per level is
// read from that waveform; the document does not state it in words.
module nikhilam_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] res
);
  always_comb begin
    logic [W-1:0]   hi, lo, nhi, nlo;
    logic [2*W:0]   acc;
    int             k;
    hi  = (x >= y) ? x : y;
    lo  = (x >= y) ? y : x;
    acc = '0;
    k   = 0;
    nhi = '0;
    nlo = '0;
    for (int lvl = 0; lvl < W; lvl++) begin
      if (lo != '0) begin
        k = 0;
        for (int i = 0; i < W; i++) if (lo[i]) k = i;   // base B = 2^k <= lo
        acc = acc + (((2*W+1)'(hi) + (2*W+1)'(lo) - ((2*W+1)'(1) << k)) << k);
        nhi = hi - (W'(1) << k);
        nlo = lo - (W'(1) << k);
        hi  = (nhi >= nlo) ? nhi : nlo;
        lo  = (nhi >= nlo) ? nlo : nhi;
      end
    end
    res = acc[2*W-1:0];
  end
endmodule
