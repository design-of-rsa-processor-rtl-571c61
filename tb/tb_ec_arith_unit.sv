// tb_ec_arith_unit: runs the four point programs of the arithmetic unit on
// the 8-bit configuration with a behavioural register file in the
// testbench. The operands are placed in words 0..6, the unit is started,
// its register writes are applied, and words 7..9 are checked against the
// affine reference; the number of register writes must equal the program
// length.
module tb_ec_arith_unit;
  import vedic_pkg::*;
  import ecc_pkg::*;
  import ec_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam fe_t   P8 = fe_t'(251);
  localparam poly_t F8 = poly_t'(9'h11B);

  logic start, we, busy, done;
  field_e field;
  ec_op_e op;
  logic [3:0] raddr_a, raddr_b, waddr;
  logic [7:0] rdata_a, rdata_b, wdata;
  logic [7:0] rf [16];
  int writes;

  ec_arith_unit #(.W(8), .BIN_M(8), .BIN_POLY(9'h11B), .PRIME_P(8'd251)) dut (.*);

  assign rdata_a = rf[raddr_a];
  assign rdata_b = rf[raddr_b];
  always @(posedge clk) if (we) begin rf[waddr] <= wdata; writes <= writes + 1; end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ec_case_t c;
    int cyc, nins;
    start = 0; field = FIELD_BINARY; op = EC_ADD; writes = 0;
    for (int i = 0; i < 16; i++) rf[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 200; t++) begin
      bit prime, dbl;
      prime = t[0]; dbl = t[1];
      c = make_case(prime, dbl, P8, F8, 8);
      @(posedge clk);
      rf[0] <= 8'(c.x1); rf[1] <= 8'(c.y1); rf[2] <= 8'(c.z1);
      rf[3] <= 8'(c.x2); rf[4] <= 8'(c.y2); rf[5] <= 8'(c.a); rf[6] <= 8'(c.b);
      writes <= 0;
      field <= prime ? FIELD_PRIME : FIELD_BINARY; op <= dbl ? EC_DBL : EC_ADD;
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      while (!done && cyc < 5000) begin @(posedge clk); cyc++; end
      case ({prime, dbl})
        2'b00: nins = 24;
        2'b01: nins = 14;
        2'b10: nins = 20;
        default: nins = 23;
      endcase
      checks++;
      if (!check_case(c, prime, fe_t'(rf[R_X3]), fe_t'(rf[R_Y3]), fe_t'(rf[R_Z3]), P8, F8, 8) ||
          writes != nins) begin
        failures++;
        $display("FAIL prime=%0d dbl=%0d: got (%0d,%0d,%0d) exp affine (%0d,%0d), %0d writes",
                 prime, dbl, rf[R_X3], rf[R_Y3], rf[R_Z3], c.ex, c.ey, writes);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
