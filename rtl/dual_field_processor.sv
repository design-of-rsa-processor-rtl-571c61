// dual_field_processor: point addition and point doubling over GF(p) or
// GF(2^m) with an Urdhva-Tiryagbhyam field multiplier.
//
// Three parts, as in the processor's block diagram: the main control unit
// (field select, operand load, sequencing), the elliptic-curve arithmetic
// unit (microcoded point formulas on one dual-field ALU) and the register
// file, whose result words are the outputs.
//
//   sel_field = 0: GF(2^BIN_M), Lopez-Dahab coordinates, curve
//                  y^2 + xy = x^3 + a x^2 + b
//   sel_field = 1: GF(PRIME_P), Jacobian coordinates (x = X/Z^2, y = Y/Z^3),
//                  curve y^2 = x^3 + a x + b
//   op = EC_ADD:   (out1,out2,out3) = (x1,y1,z1) + affine (x2,y2)
//   op = EC_DBL:   (out1,out2,out3) = 2 * (x1,y1,z1)
// Inputs must be reduced field elements. The formulas are not complete:
// the point at infinity, P = +-Q in an addition and 2-torsion points in a
// doubling are not detected.
//
// Interface: start while busy is low samples sel_field, op and all operands;
// done pulses for one clock when out1..out3 hold the result (they hold it
// until the next start). Latency: 4 + 2 per linear field operation + (2W+5)
// per field multiplication clock edges from the edge that samples start to
// the edge that raises done; at W = 192 that is 5,857 (binary addition),
// 3,902 (binary doubling), 4,301 (prime addition) and 3,920 (prime doubling).
// Defaults: W = 192 bits, GF(2^163) with x^163+x^7+x^6+x^3+1 and GF(p) with
// the NIST P-192 prime, the two sizes the document targets. The 8-bit
// version the document also shows is this module with W = BIN_M = 8.
module dual_field_processor
  import vedic_pkg::*;
  import ecc_pkg::*;
#(
  parameter int unsigned  W        = 192,
  parameter int unsigned  BIN_M    = 163,
  parameter logic [W:0]   BIN_POLY = (W+1)'(164'h8_0000_0000_0000_0000_0000_0000_0000_0000_0000_00c9),
  parameter logic [W-1:0] PRIME_P  = W'(192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff),
  parameter int unsigned  DIGIT    = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         sel_field,
  input  ec_op_e       op,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] y1,
  input  logic [W-1:0] z1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] y2,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2,
  output logic [W-1:0] out3,
  output logic         busy,
  output logic         done
);
  logic         rf_load, au_start, au_done, au_busy;
  field_e       au_field;
  ec_op_e       au_op;
  logic [3:0]   raddr_a, raddr_b, waddr;
  logic [W-1:0] rdata_a, rdata_b, wdata;
  logic         we;
  logic [W-1:0] load_data [NLOAD];   // words R_X1..R_B in register order

  assign load_data[0] = x1;
  assign load_data[1] = y1;
  assign load_data[2] = z1;
  assign load_data[3] = x2;
  assign load_data[4] = y2;
  assign load_data[5] = a;
  assign load_data[6] = b;

  ecc_main_ctrl u_ctrl (
    .clk(clk), .rst(rst), .start(start), .sel_field(sel_field), .op(op),
    .rf_load(rf_load), .au_start(au_start), .au_field(au_field), .au_op(au_op),
    .au_done(au_done), .busy(busy), .done(done)
  );

  ec_arith_unit #(.W(W), .BIN_M(BIN_M), .BIN_POLY(BIN_POLY), .PRIME_P(PRIME_P), .DIGIT(DIGIT)) u_au (
    .clk(clk), .rst(rst), .start(au_start), .field(au_field), .op(au_op),
    .raddr_a(raddr_a), .raddr_b(raddr_b), .rdata_a(rdata_a), .rdata_b(rdata_b),
    .we(we), .waddr(waddr), .wdata(wdata), .busy(au_busy), .done(au_done)
  );

  ec_regfile #(.W(W)) u_rf (
    .clk(clk), .rst(rst), .load(rf_load), .load_data(load_data),
    .we(we), .waddr(waddr), .wdata(wdata),
    .raddr_a(raddr_a), .raddr_b(raddr_b), .rdata_a(rdata_a), .rdata_b(rdata_b),
    .out_x(out1), .out_y(out2), .out_z(out3)
  );

  logic unused_au_busy;
  assign unused_au_busy = au_busy;
endmodule
