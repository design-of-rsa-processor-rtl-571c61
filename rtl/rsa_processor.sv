// rsa_processor: complete RSA processor (key generation, encryption,
// decryption) with Vedic multipliers.
//
// Dataflow, as in the processor schematic (instances m1..m5):
//   m1 prime_gen          two 8-bit primes p, q from LFSRs and a primality test
//   m3 nikhilam_mult      modulus n = p*q (16 bits)
//   m2 extended_euclidean checks gcd(e, phi) = 1 and finds d = e^-1 mod phi,
//                         phi = (p-1)(q-1) = n - p - q + 1
//   m4 rsa_cypher         encryption  cypher  = indata^e mod n
//   m5 rsa_cypher         decryption  outdata = cypher^d mod n
//
// Key generation starts by itself when prime_gen reports both primes; the
// public exponent e comes from the e_in port and is captured then.
// keys_ready rises when the Euclid unit has finished; key_ok tells whether e
// was usable (1 < e < phi and gcd(e, phi) = 1). A ds pulse while keys_ready
// and ready1 are high encrypts indata; a ds2 pulse while keys_ready and ready2
// are high decrypts the current cypher. ready1/ready2 are high while the
// respective exponentiator is idle. Data are W = 16 bits, the primes W/2.
//
// Following the document: the blocks, their order, the 8-bit primes, the
// 16-bit data and the Nikhilam multiplier for n. This design's choices: e
// as an input port, phi formed by subtraction, the automatic start of the
// Euclid unit, and the gating of ds/ds2 by keys_ready.
module rsa_processor
  import vedic_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter mult_kind_e  MULT = MULT_NIKHILAM
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           shift_en,
  input  logic           fill_sel,
  input  logic           datain_p,
  input  logic           datain_q,
  input  logic [W-1:0]   e_in,
  input  logic [W-1:0]   indata,
  input  logic           ds,
  input  logic           ds2,
  output logic [W-1:0]   cypher,
  output logic [W-1:0]   outdata,
  output logic           ready1,
  output logic           ready2,
  output logic           keys_ready,
  output logic           key_ok,
  output logic [W/2-1:0] p,
  output logic [W/2-1:0] q,
  output logic [W-1:0]   n,
  output logic [W-1:0]   d
);
  localparam int unsigned PW = W / 2;

  logic         primes_ready, primes_ready_q;
  logic [W-1:0] phi, e_reg, gcd;
  logic         eu_start, eu_busy, eu_done, coprime;
  logic         done1, done2;

  prime_gen #(.W(PW)) m1 (
    .clk(clk), .rst(rst), .shift_en(shift_en), .fill_sel(fill_sel),
    .datain_p(datain_p), .datain_q(datain_q),
    .p_out(p), .q_out(q), .ready(primes_ready)
  );

  nikhilam_mult #(.W(PW)) m3 (.x(p), .y(q), .res(n));

  assign phi = n - W'(p) - W'(q) + W'(1);

  // Key generation: start Euclid on the rising edge of primes_ready.
  assign eu_start = primes_ready & ~primes_ready_q;

  extended_euclidean #(.W(W)) m2 (
    .clk(clk), .rst(rst), .start(eu_start), .a(e_in), .b(phi),
    .busy(eu_busy), .done(eu_done), .gcd(gcd), .inv(d), .coprime(coprime)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      primes_ready_q <= 1'b0;
      keys_ready     <= 1'b0;
      key_ok         <= 1'b0;
      e_reg          <= '0;
    end else begin
      primes_ready_q <= primes_ready;
      if (eu_start) begin
        e_reg      <= e_in;
        keys_ready <= 1'b0;
      end
      if (!primes_ready) keys_ready <= 1'b0;
      if (eu_done) begin
        keys_ready <= 1'b1;
        key_ok     <= coprime && (e_reg > W'(1)) && (e_reg < phi);
      end
    end
  end

  rsa_cypher #(.W(W), .MULT(MULT)) m4 (
    .clk(clk), .rst(rst), .ds(ds & keys_ready), .indata(indata), .inexp(e_reg),
    .inmod(n), .cypher(cypher), .ready(ready1), .done(done1)
  );

  rsa_cypher #(.W(W), .MULT(MULT)) m5 (
    .clk(clk), .rst(rst), .ds(ds2 & keys_ready), .indata(cypher), .inexp(d),
    .inmod(n), .cypher(outdata), .ready(ready2), .done(done2)
  );

  // gcd is reported by the Euclid unit for inspection only; the key check
  // uses its coprime flag. done1/done2 duplicate the ready edges.
  logic unused;
  assign unused = ^{gcd, eu_busy, done1, done2};
endmodule
