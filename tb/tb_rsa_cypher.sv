// tb_rsa_cypher: modular exponentiation checks. First the reference case
// indata = 10, exponent = 11, modulus = 12, whose result is 4; then random
// cases with both multiplier kinds against a square-and-multiply model,
// checking the latency formula (1 + bit length of the exponent) rounds of
// 2W+5 clocks, and an encrypt/decrypt round trip with a valid key.
module tb_rsa_cypher;
  import vedic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        ds;
  logic [15:0] indata, inexp, inmod, c_nik, c_urd;
  logic        rdy_nik, rdy_urd, done_nik, done_urd;

  rsa_cypher #(.W(16), .MULT(MULT_NIKHILAM)) dut_nik (
    .clk(clk), .rst(rst), .ds(ds), .indata(indata), .inexp(inexp), .inmod(inmod),
    .cypher(c_nik), .ready(rdy_nik), .done(done_nik));
  rsa_cypher #(.W(16), .MULT(MULT_URDHVA)) dut_urd (
    .clk(clk), .rst(rst), .ds(ds), .indata(indata), .inexp(inexp), .inmod(inmod),
    .cypher(c_urd), .ready(rdy_urd), .done(done_urd));

  function automatic logic [15:0] modexp(input logic [15:0] m, input logic [15:0] e,
                                         input logic [15:0] n);
    logic [31:0] r, base;
    r = 32'd1 % 32'(n);
    base = 32'(m) % 32'(n);
    for (int i = 0; i < 16; i++) begin
      if (e[i]) r = (r * base) % 32'(n);
      base = (base * base) % 32'(n);
    end
    return r[15:0];
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] m, input logic [15:0] e, input logic [15:0] n,
                     output logic [15:0] res);
    int cyc, bl, expcyc;
    @(posedge clk);
    indata <= m; inexp <= e; inmod <= n; ds <= 1;
    @(posedge clk);
    ds <= 0;
    cyc = 1;
    @(posedge clk);
    while (!(rdy_nik && rdy_urd) && cyc < 5000) begin @(posedge clk); cyc++; end
    bl = 0;
    for (int i = 0; i < 16; i++) if (e[i]) bl = i + 1;
    expcyc = (1 + bl) * 37 + 1;
    checks++;
    if (c_nik != modexp(m, e, n) || c_urd != modexp(m, e, n) || cyc != expcyc) begin
      failures++;
      $display("FAIL %0d^%0d mod %0d: nik %0d urd %0d exp %0d cycles %0d/%0d",
               m, e, n, c_nik, c_urd, modexp(m, e, n), cyc, expcyc);
    end
    res = c_nik;
  endtask

  initial begin
    logic [15:0] c, back;
    ds = 0; indata = '0; inexp = '0; inmod = 16'd1;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(16'd10, 16'd11, 16'd12, c);
    checks++; if (c != 16'd4) failures++;
    // n = 61*53 = 3233, e = 17, d = 2753
    run(16'd65, 16'd17, 16'd3233, c);
    checks++; if (c != 16'd2790) begin failures++; $display("FAIL 65^17 = %0d", c); end
    run(c, 16'd2753, 16'd3233, back);
    checks++; if (back != 16'd65) begin failures++; $display("FAIL decrypt %0d", back); end
    run(16'd5, 16'd0, 16'd7, c);
    run(16'd5, 16'd3, 16'd1, c);
    for (int t = 0; t < 150; t++)
      run(16'($urandom), 16'($urandom), 16'($urandom) | 16'd1, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
