// tb_urdhva_mult: self-checking test of the Urdhva-Tiryagbhyam multiplier.
// An 8-bit instance is checked exhaustively (integer and carry-free
// products), including the two 8x8 examples 25*25 = 625 and 120*150 = 18000;
// a 192-bit instance (the ECC width) is checked on random operands. The
// references are a shift-and-add loop and a shift-and-xor loop.
module tb_urdhva_mult;
  int checks = 0, failures = 0;

  logic         gf2_8;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  logic         gf2_w;
  logic [191:0] aw, bw;
  logic [383:0] pw;

  urdhva_mult #(.W(8), .DIGIT(4))   dut8 (.gf2(gf2_8), .a(a8), .b(b8), .p(p8));
  urdhva_mult #(.W(192), .DIGIT(4)) dutw (.gf2(gf2_w), .a(aw), .b(bw), .p(pw));

  function automatic logic [383:0] ref_mul(input logic [191:0] x, input logic [191:0] y,
                                           input logic cl);
    logic [383:0] r;
    r = '0;
    for (int i = 0; i < 192; i++)
      if (y[i]) r = cl ? (r ^ (384'(x) << i)) : (r + (384'(x) << i));
    return r;
  endfunction

  task automatic check8(input logic [7:0] x, input logic [7:0] y, input logic cl);
    logic [15:0] exp;
    gf2_8 = cl; a8 = x; b8 = y;
    #1;
    exp = ref_mul(192'(x), 192'(y), cl)[15:0];
    checks++;
    if (p8 !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 8-bit gf2=%0d %0d*%0d got %0d exp %0d", cl, x, y, p8, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf2_w = 0; aw = '0; bw = '0;
    check8(8'd25, 8'd25, 1'b0);
    if (p8 != 16'd625) failures++;
    check8(8'd120, 8'd150, 1'b0);
    if (p8 != 16'd18000) failures++;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        check8(8'(x), 8'(y), 1'b0);
        check8(8'(x), 8'(y), 1'b1);
      end
    for (int t = 0; t < 200; t++) begin
      logic [383:0] exp;
      gf2_w = t[0];
      for (int k = 0; k < 6; k++) begin
        aw[k*32 +: 32] = $urandom;
        bw[k*32 +: 32] = $urandom;
      end
      if (t == 0) begin aw = '1; bw = '1; end
      #1;
      exp = ref_mul(aw, bw, gf2_w);
      checks++;
      if (pw !== exp) begin
        failures++;
        $display("FAIL 192-bit gf2=%0d", gf2_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
