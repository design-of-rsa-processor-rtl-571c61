// tb_dual_field_processor: point addition and doubling in both fields on
// the 8-bit configuration of the processor (GF(2^8) with
// x^8+x^4+x^3+x+1 and GF(251)). Each case builds random affine points,
// converts the first to projective coordinates with a random Z, runs the
// processor, and checks that the projective result represents the point
// given by the affine chord-and-tangent formulas. Cases alternate field and
// operation, and the latency of each operation is checked against the
// program length.
module tb_dual_field_processor;
  import vedic_pkg::*;
  import ec_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam fe_t   P8 = fe_t'(251);
  localparam poly_t F8 = poly_t'(9'h11B);

  logic start, sel_field, busy, done;
  ec_op_e op;
  logic [7:0] x1, y1, z1, x2, y2, a, b, out1, out2, out3;

  dual_field_processor #(.W(8), .BIN_M(8), .BIN_POLY(9'h11B), .PRIME_P(8'd251)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clocks per run as seen by this testbench: 5 + 2 per linear instruction
  // + (2W+5) per multiplication.
  function automatic int exp_cycles(bit prime, bit dbl);
    int nmul, nlin;
    case ({prime, dbl})
      2'b00: begin nmul = 15; nlin = 9;  end
      2'b01: begin nmul = 10; nlin = 4;  end
      2'b10: begin nmul = 11; nlin = 9;  end
      default: begin nmul = 10; nlin = 13; end
    endcase
    return nmul * (2*8 + 5) + nlin * 2 + 5;
  endfunction

  initial begin
    int cyc;
    int count [4];
    ec_case_t c;
    start = 0; sel_field = 0; op = EC_ADD;
    x1 = '0; y1 = '0; z1 = '0; x2 = '0; y2 = '0; a = '0; b = '0;
    for (int i = 0; i < 4; i++) count[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 400; t++) begin
      bit prime, dbl;
      prime = t[0]; dbl = t[1];
      c = make_case(prime, dbl, P8, F8, 8);
      @(posedge clk);
      sel_field <= prime; op <= dbl ? EC_DBL : EC_ADD;
      x1 <= 8'(c.x1); y1 <= 8'(c.y1); z1 <= 8'(c.z1);
      x2 <= 8'(c.x2); y2 <= 8'(c.y2); a <= 8'(c.a); b <= 8'(c.b);
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 1;
      while (!done && cyc < 5000) begin @(posedge clk); cyc++; end
      checks++;
      if (!check_case(c, prime, fe_t'(out1), fe_t'(out2), fe_t'(out3), P8, F8, 8) ||
          cyc != exp_cycles(prime, dbl)) begin
        failures++;
        $display("FAIL prime=%0d dbl=%0d in (%0d,%0d,%0d)+(%0d,%0d) a=%0d b=%0d: got (%0d,%0d,%0d) exp affine (%0d,%0d) cycles %0d/%0d",
                 prime, dbl, c.x1, c.y1, c.z1, c.x2, c.y2, c.a, c.b, out1, out2, out3,
                 c.ex, c.ey, cyc, exp_cycles(prime, dbl));
      end else count[{prime, dbl}]++;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (count[i] == 0) begin failures++; $display("FAIL operation %0d never passed", i); end
    end
    $display("passed: binary add %0d, binary dbl %0d, prime add %0d, prime dbl %0d",
             count[0], count[1], count[2], count[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
