// prime_gen: produces the two RSA primes p and q.
//
// Each prime has its own W-bit LFSR (Galois form, taps TAPS). While fill_sel
// and shift_en are high the LFSRs are seeded serially, one bit per clock,
// from datain_p and datain_q. When fill_sel is low and shift_en high the
// generator searches: the candidate is the LFSR state with its top and bottom
// bits forced to 1 (odd, full W bits, so n = p*q always uses 2W-1 or 2W
// bits); the primality tester checks it, and a composite candidate advances
// the LFSR by one step and is replaced. p is found first, then q, which must
// differ from p. ready rises when both primes are valid and stays high until
// the LFSRs are seeded again. The search starts once fill_sel is low and
// shift_en is high.
//
// Interface: p_out/q_out are valid while ready is high.
// The LFSR source, the ports shift_en, fill_sel, datain_p, datain_q and the
// 8-bit primes follow the document; forcing the top/bottom bits, the search
// order and the tap choice are this design's choices.
module prime_gen #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'('hB8)   // x^8+x^6+x^5+x^4+1, maximal length
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift_en,
  input  logic         fill_sel,
  input  logic         datain_p,
  input  logic         datain_q,
  output logic [W-1:0] p_out,
  output logic [W-1:0] q_out,
  output logic         ready
);
  typedef enum logic [2:0] {S_FILL, S_TEST_P, S_WAIT_P, S_TEST_Q, S_WAIT_Q, S_READY} state_e;
  state_e state;

  logic [W-1:0] lfsr_p, lfsr_q;
  logic [W-1:0] cand_p, cand_q, cand;
  logic         t_start, t_done, t_prime;
  logic         unused_t_busy;   // done/is_prime carry the result

  function automatic logic [W-1:0] lfsr_step(input logic [W-1:0] s);
    logic [W-1:0] nx;
    nx = s[0] ? ((s >> 1) ^ TAPS) : (s >> 1);
    return (nx == '0) ? W'(1) : nx;
  endfunction

  assign cand_p  = lfsr_p | W'(1) | (W'(1) << (W-1));
  assign cand_q  = lfsr_q | W'(1) | (W'(1) << (W-1));
  assign cand    = (state == S_TEST_Q) ? cand_q : cand_p;
  assign t_start = (state == S_TEST_P) || (state == S_TEST_Q);

  primality_tester #(.W(W)) u_test (
    .clk(clk), .rst(rst), .start(t_start), .cand(cand),
    .busy(unused_t_busy), .done(t_done), .is_prime(t_prime)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_FILL;
      lfsr_p <= W'(1);
      lfsr_q <= W'(2);
      p_out  <= '0;
      q_out  <= '0;
    end else if (fill_sel) begin
      if (shift_en) begin
        lfsr_p <= {lfsr_p[W-2:0], datain_p};
        lfsr_q <= {lfsr_q[W-2:0], datain_q};
      end
      state <= S_FILL;
    end else begin
      case (state)
        S_FILL:   if (shift_en) state <= S_TEST_P;
        S_TEST_P: state <= S_WAIT_P;
        S_WAIT_P: if (t_done) begin
          if (t_prime) begin
            p_out <= cand_p;
            state <= S_TEST_Q;
          end else begin
            lfsr_p <= lfsr_step(lfsr_p);
            state  <= S_TEST_P;
          end
        end
        S_TEST_Q: state <= S_WAIT_Q;
        S_WAIT_Q: if (t_done) begin
          if (t_prime && cand_q != p_out) begin
            q_out <= cand_q;
            state <= S_READY;
          end else begin
            lfsr_q <= lfsr_step(lfsr_q);
            state  <= S_TEST_Q;
          end
        end
        S_READY:  state <= S_READY;
        default:  state <= S_FILL;
      endcase
    end
  end

  assign ready = (state == S_READY);
endmodule
