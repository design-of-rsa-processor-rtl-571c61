// extended_euclidean: gcd and modular inverse for RSA key generation.
//
// Runs the extended Euclidean algorithm on (a, b) = (e, phi): each clock
// performs one division step
//   q = r0 / r1;  (r0, r1) <= (r1, r0 - q*r1);  (s0, s1) <= (s1, s0 - q*s1)
// until r1 = 0. Then gcd = r0, and when gcd = 1 the private key
// inv = s0 mod b satisfies a*inv = 1 (mod b). coprime reports gcd == 1,
// which is the check e must pass (1 < e < phi, gcd(e, phi) = 1); for a
// non-coprime pair gcd is still reported and inv is 0.
//
// Interface: pulse start with a, b valid (captured). busy is high while
// iterating, done pulses for one clock when gcd, inv and coprime are valid;
// they hold until the next start. Latency: number of division steps + 1
// clocks (at most about 1.44*W + 2).
// The document gives the function and the gcd output (its example is
// gcd(20, 15) = 5); the one-division-per-clock datapath is this design's.
module extended_euclidean #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] gcd,
  output logic [W-1:0] inv,
  output logic         coprime
);
  logic [W-1:0]        r0, r1, bq, quo;
  logic signed [W+1:0] s0, s1, s_next, s_mod;

  assign quo    = (r1 != '0) ? (r0 / r1) : '0;
  assign s_next = s0 - $signed({2'b00, quo}) * s1;
  assign s_mod  = (s0 < 0) ? (s0 + $signed({2'b00, bq})) : s0;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      gcd     <= '0;
      inv     <= '0;
      coprime <= 1'b0;
      r0 <= '0; r1 <= '0; s0 <= '0; s1 <= '0; bq <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        r0   <= a;
        r1   <= b;
        s0   <= (W+2)'(1);
        s1   <= '0;
        bq   <= b;
        busy <= 1'b1;
      end else if (busy) begin
        if (r1 == '0) begin
          gcd     <= r0;
          coprime <= (r0 == W'(1));
          inv     <= (r0 == W'(1)) ? ((bq == W'(1)) ? '0 : s_mod[W-1:0]) : '0;
          busy    <= 1'b0;
          done    <= 1'b1;
        end else begin
          r0 <= r1;
          r1 <= r0 - quo * r1;
          s0 <= s1;
          s1 <= s_next;
        end
      end
    end
  end
endmodule
