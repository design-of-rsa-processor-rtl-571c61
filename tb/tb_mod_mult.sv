// tb_mod_mult: checks a*b mod n for the Nikhilam-based and the
// Urdhva-based unit on random 16-bit operands, and that rdy returns 2W+3
// edges after the edge that samples go (seen 2W+4 clocks after go rises).
module tb_mod_mult;
  import vedic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        go;
  logic [15:0] a, b, n, r_nik, r_urd;
  logic        rdy_nik, rdy_urd;

  mod_mult #(.W(16), .MULT(MULT_NIKHILAM)) dut_nik (
    .clk(clk), .rst(rst), .go(go), .a(a), .b(b), .n(n), .rdy(rdy_nik), .r(r_nik));
  mod_mult #(.W(16), .MULT(MULT_URDHVA)) dut_urd (
    .clk(clk), .rst(rst), .go(go), .a(a), .b(b), .n(n), .rdy(rdy_urd), .r(r_urd));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [15:0] exp;
    go = 0; a = '0; b = '0; n = 16'd1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 600; t++) begin
      @(posedge clk);
      a <= 16'($urandom); b <= 16'($urandom); n <= 16'($urandom) | 16'd1;
      if (t == 0) begin a <= 16'hFFFF; b <= 16'hFFFF; n <= 16'hFFFF; end
      go <= 1;
      @(posedge clk);
      go <= 0;
      exp = 16'((32'(a) * 32'(b)) % 32'(n));
      cyc = 1;
      @(posedge clk);
      while (!(rdy_nik && rdy_urd) && cyc < 100) begin @(posedge clk); cyc++; end
      checks++;
      if (r_nik != exp || r_urd != exp || cyc != 36) begin
        failures++;
        $display("FAIL %0d*%0d mod %0d: nik %0d urd %0d exp %0d cycles %0d",
                 a, b, n, r_nik, r_urd, exp, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
