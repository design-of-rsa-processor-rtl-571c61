// mod_mult: modular multiplier r = a*b mod n for the RSA exponentiator.
//
// The full 2W-bit product is formed in one clock by a Vedic multiplier,
// Nikhilam or Urdhva-Tiryagbhyam as chosen by MULT, and is then reduced
// modulo n by the sequential shift-and-subtract reducer (one product bit per
// clock). Two of these units sit inside the exponentiator, one multiplying
// and one squaring, with the go/rdy handshake of its multgo/multrdy and
// sqrgo/sqrrdy signals.
//
// Interface: go pulses with a, b, n valid (captured on that edge). rdy is
// high whenever the unit is idle and its r output is valid; it drops on the
// clock after go and rises again with the new result: 2W+3 rising edges
// after the edge that samples go. n must be non-zero.
// The document names the units and their handshake; the multiplier-then-
// reduce structure is this design's choice.
module mod_mult
  import vedic_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter mult_kind_e  MULT = MULT_NIKHILAM
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         go,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic         rdy,
  output logic [W-1:0] r
);
  logic [W-1:0]   ar, br, nr;
  logic [2*W-1:0] prod, prod_q;
  logic           red_start, red_busy, red_done;
  logic           unused_busy;

  if (MULT == MULT_NIKHILAM) begin : g_nik
    nikhilam_mult #(.W(W)) u_mul (.x(ar), .y(br), .res(prod));
  end else begin : g_urd
    urdhva_mult #(.W(W)) u_mul (.gf2(1'b0), .a(ar), .b(br), .p(prod));
  end

  mod_reducer #(.W(W)) u_red (
    .clk(clk), .rst(rst), .start(red_start), .gf2(1'b0), .val(prod_q), .n(nr),
    .busy(red_busy), .done(red_done), .res(r)
  );

  // go -> operands captured; next clock the product is registered; the clock
  // after that starts the reducer.
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_START, S_RED} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      ar      <= '0;
      br      <= '0;
      nr      <= W'(1);
      prod_q  <= '0;
    end else begin
      case (state)
        S_IDLE:  if (go) begin
                   ar <= a; br <= b; nr <= n;
                   state <= S_MUL;
                 end
        S_MUL:   begin prod_q <= prod; state <= S_START; end
        S_START: state <= S_RED;
        S_RED:   if (red_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign red_start = (state == S_START);
  assign rdy       = (state == S_IDLE);
  assign unused_busy = red_busy;
endmodule
