// crypto_node_top: public-key hardware for a wireless sensor node.
//
// Two independent engines side by side, each with its own ports:
//   rsa_*  the 16-bit RSA processor (prime generation, key generation with
//          the extended Euclidean algorithm, Nikhilam modulus multiplier,
//          encryption and decryption exponentiators)
//   ecc_*  the dual-field ECC point-arithmetic processor (point addition
//          and doubling over GF(2^163) or the P-192 prime field, with the
//          Urdhva-Tiryagbhyam field multiplier)
// They share only the clock and the synchronous, active-high reset. See
// rsa_processor and dual_field_processor for the protocols and timing.
// Putting the two in one top is this design's choice; the document
// presents them as two processors.
module crypto_node_top
  import vedic_pkg::*;
#(
  parameter int unsigned  RSA_W     = 16,
  parameter mult_kind_e   RSA_MULT  = MULT_NIKHILAM,
  parameter int unsigned  ECC_W     = 192,
  parameter int unsigned  ECC_BIN_M = 163,
  parameter logic [ECC_W:0]   ECC_BIN_POLY = (ECC_W+1)'(164'h8_0000_0000_0000_0000_0000_0000_0000_0000_0000_00c9),
  parameter logic [ECC_W-1:0] ECC_PRIME_P  = ECC_W'(192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff)
) (
  input  logic               clk,
  input  logic               rst,
  // RSA processor
  input  logic               rsa_shift_en,
  input  logic               rsa_fill_sel,
  input  logic               rsa_datain_p,
  input  logic               rsa_datain_q,
  input  logic [RSA_W-1:0]   rsa_e,
  input  logic [RSA_W-1:0]   rsa_indata,
  input  logic               rsa_ds,
  input  logic               rsa_ds2,
  output logic [RSA_W-1:0]   rsa_cypher,
  output logic [RSA_W-1:0]   rsa_outdata,
  output logic               rsa_ready1,
  output logic               rsa_ready2,
  output logic               rsa_keys_ready,
  output logic               rsa_key_ok,
  output logic [RSA_W/2-1:0] rsa_p,
  output logic [RSA_W/2-1:0] rsa_q,
  output logic [RSA_W-1:0]   rsa_n,
  output logic [RSA_W-1:0]   rsa_d,
  // ECC processor
  input  logic               ecc_start,
  input  logic               ecc_sel_field,
  input  ec_op_e             ecc_op,
  input  logic [ECC_W-1:0]   ecc_x1,
  input  logic [ECC_W-1:0]   ecc_y1,
  input  logic [ECC_W-1:0]   ecc_z1,
  input  logic [ECC_W-1:0]   ecc_x2,
  input  logic [ECC_W-1:0]   ecc_y2,
  input  logic [ECC_W-1:0]   ecc_a,
  input  logic [ECC_W-1:0]   ecc_b,
  output logic [ECC_W-1:0]   ecc_out1,
  output logic [ECC_W-1:0]   ecc_out2,
  output logic [ECC_W-1:0]   ecc_out3,
  output logic               ecc_busy,
  output logic               ecc_done
);
  rsa_processor #(.W(RSA_W), .MULT(RSA_MULT)) u_rsa (
    .clk(clk), .rst(rst), .shift_en(rsa_shift_en), .fill_sel(rsa_fill_sel),
    .datain_p(rsa_datain_p), .datain_q(rsa_datain_q), .e_in(rsa_e),
    .indata(rsa_indata), .ds(rsa_ds), .ds2(rsa_ds2),
    .cypher(rsa_cypher), .outdata(rsa_outdata), .ready1(rsa_ready1), .ready2(rsa_ready2),
    .keys_ready(rsa_keys_ready), .key_ok(rsa_key_ok),
    .p(rsa_p), .q(rsa_q), .n(rsa_n), .d(rsa_d)
  );

  dual_field_processor #(
    .W(ECC_W), .BIN_M(ECC_BIN_M), .BIN_POLY(ECC_BIN_POLY), .PRIME_P(ECC_PRIME_P)
  ) u_ecc (
    .clk(clk), .rst(rst), .start(ecc_start), .sel_field(ecc_sel_field), .op(ecc_op),
    .x1(ecc_x1), .y1(ecc_y1), .z1(ecc_z1), .x2(ecc_x2), .y2(ecc_y2), .a(ecc_a), .b(ecc_b),
    .out1(ecc_out1), .out2(ecc_out2), .out3(ecc_out3), .busy(ecc_busy), .done(ecc_done)
  );
endmodule
