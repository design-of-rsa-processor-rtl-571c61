// ec_regfile: register file of the dual-field ECC processor.
//
// NREG words of W bits. The arithmetic unit reads two words per clock
// (combinational read ports a and b) and writes one (synchronous port w).
// The main control unit loads the seven operand words 0..NLOAD-1 (point
// coordinates and curve coefficients) in one clock through the load port;
// load takes priority over a write to the same word. The result words
// R_X3, R_Y3, R_Z3 are brought out permanently as out_x, out_y, out_z.
// Reset clears every word.
// The document shows a register file holding the 163/192-bit output; its
// size, ports and the parallel load are this design's choices.
module ec_regfile
  import ecc_pkg::*;
#(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] load_data [NLOAD],
  input  logic         we,
  input  logic [3:0]   waddr,
  input  logic [W-1:0] wdata,
  input  logic [3:0]   raddr_a,
  input  logic [3:0]   raddr_b,
  output logic [W-1:0] rdata_a,
  output logic [W-1:0] rdata_b,
  output logic [W-1:0] out_x,
  output logic [W-1:0] out_y,
  output logic [W-1:0] out_z
);
  logic [W-1:0] mem [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) mem[i] <= '0;
    end else begin
      if (we) mem[waddr] <= wdata;
      if (load) begin
        for (int i = 0; i < NLOAD; i++) mem[i] <= load_data[i];
      end
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
  assign out_x   = mem[R_X3];
  assign out_y   = mem[R_Y3];
  assign out_z   = mem[R_Z3];
endmodule
