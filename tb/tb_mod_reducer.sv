// tb_mod_reducer: checks the sequential reducer in both modes.
// Integer mode (W = 16): random 32-bit values and moduli against the %
// operator. GF(2) mode (W = 8, f = x^8+x^4+x^3+x+1): random 16-bit
// polynomials against a shift-and-xor reference. done must be seen 2W+2
// clocks after start is raised (2W edges after the edge that samples it).
module tb_mod_reducer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        s16, d16, b16;
  logic [31:0] v16;
  logic [15:0] n16, r16;
  logic        s8, d8, b8;
  logic [15:0] v8;
  logic [7:0]  r8;

  mod_reducer #(.W(16)) dut16 (
    .clk(clk), .rst(rst), .start(s16), .gf2(1'b0), .val(v16), .n(n16),
    .busy(b16), .done(d16), .res(r16)
  );
  mod_reducer #(.W(8), .BIN_M(8), .BIN_POLY(9'h11B)) dut8 (
    .clk(clk), .rst(rst), .start(s8), .gf2(1'b1), .val(v8), .n(8'd0),
    .busy(b8), .done(d8), .res(r8)
  );

  function automatic logic [7:0] ref_gf(input logic [15:0] v);
    for (int i = 15; i >= 8; i--)
      if (v[i]) v = v ^ (16'h11B << (i - 8));
    return v[7:0];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    s16 = 0; s8 = 0; v16 = '0; n16 = 16'd1; v8 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 500; t++) begin
      @(posedge clk);
      v16 <= $urandom; n16 <= 16'($urandom) | 16'd1;
      if (t == 0) begin v16 <= 32'hFFFF_FFFF; n16 <= 16'hFFFF; end
      if (t == 1) begin v16 <= 32'd12345; n16 <= 16'd1; end
      v8 <= 16'($urandom);
      s16 <= 1; s8 <= 1;
      @(posedge clk);
      s16 <= 0; s8 <= 0;
      cyc = 1;
      while (!d16 && cyc < 100) begin @(posedge clk); cyc++; end
      checks++;
      if (r16 != 16'(v16 % 32'(n16)) || cyc != 34) begin
        failures++;
        $display("FAIL %0d mod %0d: got %0d after %0d clocks", v16, n16, r16, cyc);
      end
      checks++;
      if (r8 != ref_gf(v8)) begin
        failures++;
        $display("FAIL gf %h: got %h exp %h", v8, r8, ref_gf(v8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
