// field_alu: dual-field arithmetic for the ECC processor.
//
// One unit serves GF(p) (field = FIELD_PRIME) and GF(2^m)
// (field = FIELD_BINARY):
//   F_ADD   GF(p): (x + y) mod p         GF(2^m): x xor y
//   F_SUB   GF(p): (x - y) mod p         GF(2^m): x xor y
//   F_HALF  GF(p): x / 2 mod p, i.e. x/2 or (x + p)/2
//                                        GF(2^m): x (not used there)
//   F_MUL   full product from the Urdhva-Tiryagbhyam multiplier (integer
//           for GF(p), carry-free for GF(2^m)), then reduced modulo p or
//           the irreducible polynomial BIN_POLY of degree BIN_M by the
//           bit-serial reducer
// Operands must be reduced: below p in GF(p), of degree below BIN_M in
// GF(2^m). Elements use the polynomial basis.
//
// Interface: start pulses with op, field, x, y valid (captured). done pulses
// for one clock with z valid; z holds until the next start. Latency: 1 clock
// for add, subtract and halve; 2W+3 clocks for a multiplication.
// Defaults: W = 192 bits, the NIST B-163 pentanomial x^163+x^7+x^6+x^3+1 and
// the NIST P-192 prime 2^192-2^64-1; the document names these field sizes
// and the NIST/SECG curves, the two moduli are the standard ones for them.
module field_alu
  import vedic_pkg::*;
  import ecc_pkg::*;
#(
  parameter int unsigned W        = 192,
  parameter int unsigned BIN_M    = 163,
  parameter logic [W:0]  BIN_POLY = (W+1)'(164'h8_0000_0000_0000_0000_0000_0000_0000_0000_0000_00c9),
  parameter logic [W-1:0] PRIME_P = W'(192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff),
  parameter int unsigned DIGIT    = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  fop_e         op,
  input  field_e       field,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] z
);
  typedef enum logic [1:0] {S_IDLE, S_PROD, S_RSTART, S_RED} state_e;
  state_e state;

  logic [W-1:0]   xr, yr;
  logic           gf2;
  logic [2*W-1:0] prod, prod_q;
  logic           red_start, red_busy, red_done;
  logic [W-1:0]   red_res;
  logic [W:0]     sum, diff, half_in;
  logic [W-1:0]   add_r, sub_r, half_r;

  assign gf2 = (field == FIELD_BINARY);

  // Linear operations, combinational on the inputs.
  assign sum     = {1'b0, x} + {1'b0, y};
  assign add_r   = (sum >= {1'b0, PRIME_P}) ? W'(sum - {1'b0, PRIME_P}) : sum[W-1:0];
  assign diff    = {1'b0, x} - {1'b0, y};
  assign sub_r   = diff[W] ? W'(diff + {1'b0, PRIME_P}) : diff[W-1:0];
  assign half_in = x[0] ? ({1'b0, x} + {1'b0, PRIME_P}) : {1'b0, x};
  assign half_r  = half_in[W:1];

  urdhva_mult #(.W(W), .DIGIT(DIGIT)) u_mul (.gf2(gf2), .a(xr), .b(yr), .p(prod));

  mod_reducer #(.W(W), .BIN_M(BIN_M), .BIN_POLY(BIN_POLY)) u_red (
    .clk(clk), .rst(rst), .start(red_start), .gf2(gf2), .val(prod_q), .n(PRIME_P),
    .busy(red_busy), .done(red_done), .res(red_res)
  );

  assign red_start = (state == S_RSTART);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      xr     <= '0;
      yr     <= '0;
      prod_q <= '0;
      z      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          case (op)
            F_ADD:  begin z <= gf2 ? (x ^ y) : add_r;  done <= 1'b1; end
            F_SUB:  begin z <= gf2 ? (x ^ y) : sub_r;  done <= 1'b1; end
            F_HALF: begin z <= gf2 ? x : half_r;       done <= 1'b1; end
            F_MUL:  begin xr <= x; yr <= y; state <= S_PROD; end
            default: done <= 1'b1;
          endcase
        end
        S_PROD:   begin prod_q <= prod; state <= S_RSTART; end
        S_RSTART: state <= S_RED;
        S_RED:    if (red_done) begin
          z     <= red_res;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default:  state <= S_IDLE;
      endcase
    end
  end

  logic unused_red_busy;
  assign unused_red_busy = red_busy;
endmodule
