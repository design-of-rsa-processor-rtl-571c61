// primality_tester: decides whether a W-bit candidate is prime.
//
// Trial division: the divisors d = 2, 3, 4, ... are tried one per clock
// while d*d <= cand; a zero remainder marks the candidate composite, and
// running out of divisors marks it prime. 0 and 1 are not prime.
// For W = 8 at most 15 divisors are tried.
//
// Interface: pulse start with cand valid (captured). done pulses for one
// clock with is_prime valid; is_prime holds until the next start. busy is
// high in between. Latency: 2 to 16 clocks for W = 8.
// The document names a primality tester for p and q but not its method;
// trial division is this design's choice, the simplest exact test at 8 bits.
module primality_tester #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] cand,
  output logic         busy,
  output logic         done,
  output logic         is_prime
);
  logic [W-1:0]   c, d;
  logic [2*W-1:0] dsq;

  assign dsq = d * d;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      is_prime <= 1'b0;
      c        <= '0;
      d        <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        c    <= cand;
        d    <= W'(2);
        busy <= 1'b1;
      end else if (busy) begin
        if (c < W'(2)) begin
          is_prime <= 1'b0;
          busy     <= 1'b0;
          done     <= 1'b1;
        end else if (dsq > (2*W)'(c)) begin
          is_prime <= 1'b1;
          busy     <= 1'b0;
          done     <= 1'b1;
        end else if (c % d == '0) begin
          is_prime <= 1'b0;
          busy     <= 1'b0;
          done     <= 1'b1;
        end else begin
          d <= d + 1'b1;
        end
      end
    end
  end
endmodule
