// tb_field_alu: random add / subtract / halve / multiply checks in both
// fields, for the 8-bit configuration (GF(2^8) with x^8+x^4+x^3+x+1,
// GF(251)) and the default 192-bit configuration (GF(2^163), P-192),
// against the behavioural reference. Checks the latency too: 1 clock for the
// linear operations, 2W+3 for a multiplication.
module tb_field_alu;
  import vedic_pkg::*;
  import ecc_pkg::*;
  import ec_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam fe_t   P8   = fe_t'(251);
  localparam poly_t F8   = poly_t'(9'h11B);
  localparam fe_t   P192 = 192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff;
  localparam poly_t F163 = (poly_t'(1) << 163) | poly_t'(8'hC9);

  logic start8, busy8, done8, start_w, busy_w, done_w;
  fop_e op;
  field_e field;
  logic [7:0]   x8, y8, z8;
  logic [191:0] xw, yw, zw;

  field_alu #(.W(8), .BIN_M(8), .BIN_POLY(9'h11B), .PRIME_P(8'd251)) dut8 (
    .clk(clk), .rst(rst), .start(start8), .op(op), .field(field), .x(x8), .y(y8),
    .busy(busy8), .done(done8), .z(z8));
  field_alu dutw (
    .clk(clk), .rst(rst), .start(start_w), .op(op), .field(field), .x(xw), .y(yw),
    .busy(busy_w), .done(done_w), .z(zw));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t expect_op(fop_e o, field_e f, fe_t x, fe_t y, fe_t p, poly_t pf, int m);
    if (f == FIELD_PRIME) begin
      case (o)
        F_ADD:  return p_add(x, y, p);
        F_SUB:  return p_sub(x, y, p);
        F_HALF: return p_mul(x, p_inv(fe_t'(2), p), p);
        default: return p_mul(x, y, p);
      endcase
    end else begin
      case (o)
        F_ADD, F_SUB: return x ^ y;
        F_HALF: return x;
        default: return b_mul(x, y, pf, m);
      endcase
    end
  endfunction

  // wide = 0: 8-bit unit, wide = 1: 192-bit unit
  task automatic run(input bit wide, input fop_e o, input field_e f, input fe_t x, input fe_t y);
    int cyc, expcyc;
    fe_t exp, got;
    @(posedge clk);
    op <= o; field <= f;
    if (wide) begin xw <= x; yw <= y; start_w <= 1; end
    else      begin x8 <= 8'(x); y8 <= 8'(y); start8 <= 1; end
    @(posedge clk);
    start_w <= 0; start8 <= 0;
    cyc = 1;
    while (!(wide ? done_w : done8) && cyc < 1000) begin @(posedge clk); cyc++; end
    if (wide) exp = expect_op(o, f, x, y, P192, F163, 163);
    else      exp = expect_op(o, f, x, y, P8, F8, 8);
    got = wide ? zw : fe_t'(z8);
    expcyc = (o == F_MUL) ? (wide ? 2*192+5 : 2*8+5) : 2;   // edges + 2 as seen here
    checks++;
    if (got != exp || cyc != expcyc) begin
      failures++;
      $display("FAIL wide=%0d op=%0d field=%0d x=%h y=%h got %h exp %h cycles %0d/%0d",
               wide, o, f, x, y, got, exp, cyc, expcyc);
    end
  endtask

  initial begin
    fop_e ops [4] = '{F_ADD, F_SUB, F_HALF, F_MUL};
    start8 = 0; start_w = 0; op = F_NOP; field = FIELD_BINARY;
    x8 = '0; y8 = '0; xw = '0; yw = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 400; t++) begin
      fop_e o;
      o = ops[t % 4];
      run(0, o, FIELD_PRIME,  rand_p(P8), rand_p(P8));
      run(0, o, FIELD_BINARY, rand_b(8),  rand_b(8));
    end
    run(0, F_MUL, FIELD_PRIME, fe_t'(250), fe_t'(250));
    run(0, F_SUB, FIELD_PRIME, fe_t'(0), fe_t'(250));
    for (int t = 0; t < 60; t++) begin
      fop_e o;
      o = ops[t % 4];
      run(1, o, FIELD_PRIME,  rand_p(P192), rand_p(P192));
      run(1, o, FIELD_BINARY, rand_b(163),  rand_b(163));
    end
    run(1, F_MUL, FIELD_PRIME, P192 - 1, P192 - 1);
    run(1, F_ADD, FIELD_PRIME, P192 - 1, P192 - 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
