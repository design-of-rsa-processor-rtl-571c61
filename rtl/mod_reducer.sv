// mod_reducer: sequential reduction of a double-width product.
//
// The 2W-bit value is consumed one bit per clock, most significant bit first,
// into a remainder r (Horner's rule):
//   integer mode : r = 2r + bit, then r = r - n if r >= n   (0 <= r < n kept)
//   GF(2) mode   : r = x*r + bit, then r = r + f(x) if the degree reaches M
// where n is the run-time modulus and f(x) = BIN_POLY is the fixed
// irreducible polynomial of degree BIN_M. After 2W clocks r is the residue.
//
// Interface: pulse start with val, n and gf2 valid (they are captured); busy is high while
// reducing; done pulses for one clock when res holds the result, which stays
// until the next start. Latency: done is high in the clock cycle that
// follows the 2W-th rising edge after the edge that samples start.
// In integer mode n must be at least 1; the result is val mod n.
// The document uses modular products but does not say how they are reduced;
// this shift-and-subtract reducer is this design's choice.
module mod_reducer #(
  parameter int unsigned W        = 16,
  parameter int unsigned BIN_M    = 8,
  parameter logic [W:0]  BIN_POLY = (W+1)'('h11B)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           gf2,
  input  logic [2*W-1:0] val,
  input  logic [W-1:0]   n,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   res
);
  localparam int unsigned CNTW = $clog2(2*W + 1);

  logic [2*W-1:0] sh;
  logic [W:0]     r;
  logic [CNTW-1:0] cnt;
  logic           mode;
  logic [W-1:0]   nreg;
  logic [W:0]     r2, r_next;

  // One Horner step.
  always_comb begin
    r2 = {r[W-1:0], sh[2*W-1]};
    if (mode) r_next = r2[BIN_M] ? (r2 ^ BIN_POLY) : r2;
    else      r_next = (r2 >= {1'b0, nreg}) ? (r2 - {1'b0, nreg}) : r2;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      r    <= '0;
      sh   <= '0;
      cnt  <= '0;
      mode <= 1'b0;
      nreg <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        sh   <= val;
        r    <= '0;
        cnt  <= '0;
        mode <= gf2;
        nreg <= n;
      end else if (busy) begin
        r   <= r_next;
        sh  <= sh << 1;
        cnt <= cnt + 1'b1;
        if (cnt == CNTW'(2*W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign res = r[W-1:0];
endmodule
