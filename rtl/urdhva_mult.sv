// urdhva_mult: Urdhva-Tiryagbhyam ("vertically and crosswise") multiplier.
//
// The operands are cut into DIGIT-bit digits a_i, b_j. Column k of the
// product collects the crosswise digit products a_i*b_j with i+j = k (the
// vertical product for the outermost columns); each digit product is a
// small DIGIT x DIGIT multiplier. The column sums are then
// added with their weights 2^(k*DIGIT). For W=8, DIGIT=4 this is the 8x8
// structure of four 4x4 products: column 0 = aL*bL, column 1 = aH*bL + aL*bH,
// column 2 = aH*bH, followed by the carry-propagating sums.
//
// With gf2=1 every addition becomes an exclusive-or, which gives the
// carry-free polynomial product used for GF(2^m) arithmetic; the same array
// therefore serves both fields of the dual-field ECC processor.
//
// Interface: purely combinational, p = a*b (integer) or a(x)*b(x) over GF(2).
// The digit width and the run-time carry-free control are this design's
// choices; the document gives the method and the 8-bit 4x4-block structure.
module urdhva_mult #(
  parameter int unsigned W     = 8,
  parameter int unsigned DIGIT = 4
) (
  input  logic           gf2,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned ND = (W + DIGIT - 1) / DIGIT;   // digits per operand
  localparam int unsigned PW = ND * DIGIT;                 // padded width
  localparam int unsigned CW = 2*DIGIT + $clog2(ND) + 1;  // column sum width

  logic [PW-1:0]   ap, bp;

  assign ap = PW'(a);
  assign bp = PW'(b);

  // Product of two digits: the integer product, or the carry-free product
  // (partial products combined by exclusive-or).
  function automatic logic [2*DIGIT-1:0] digit_mul(input logic [DIGIT-1:0] x,
                                                   input logic [DIGIT-1:0] y,
                                                   input logic            cl);
    logic [2*DIGIT-1:0] r;
    if (cl) begin
      r = '0;
      for (int i = 0; i < DIGIT; i++)
        if (y[i]) r = r ^ ((2*DIGIT)'(x) << i);
    end else begin
      r = (2*DIGIT)'(x) * (2*DIGIT)'(y);
    end
    return r;
  endfunction

  // Digit products a_i * b_j.
  logic [2*DIGIT-1:0] dp [ND][ND];
  for (genvar i = 0; i < ND; i++) begin : g_row
    for (genvar j = 0; j < ND; j++) begin : g_col
      assign dp[i][j] = digit_mul(ap[i*DIGIT +: DIGIT], bp[j*DIGIT +: DIGIT], gf2);
    end
  end

  // Column k: crosswise sum of the digit products with i + j = k, then the
  // weighted accumulation of the columns (carry-propagating or xor).
  logic [2*PW-1:0] acc [2*ND];
  assign acc[0] = '0;
  for (genvar k = 0; k < 2*ND-1; k++) begin : g_column
    logic [CW-1:0]      colsum;
    logic [2*DIGIT-1:0] colx;
    always_comb begin
      colsum = '0;
      colx   = '0;
      for (int i = 0; i < ND; i++) begin
        if (k - i >= 0 && k - i < ND) begin
          colsum = colsum + CW'(dp[i][k-i]);
          colx   = colx ^ dp[i][k-i];
        end
      end
    end
    assign acc[k+1] = gf2 ? (acc[k] ^ ((2*PW)'(colx) << (k*DIGIT)))
                          : (acc[k] + ((2*PW)'(colsum) << (k*DIGIT)));
  end

  assign p = acc[2*ND-1][2*W-1:0];
endmodule
