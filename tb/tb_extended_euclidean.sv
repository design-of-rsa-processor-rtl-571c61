// tb_extended_euclidean: checks gcd, coprimality and the modular inverse on
// the example gcd(20, 15) = 5, on small RSA-like pairs and on random 16-bit
// pairs, with the reference computed by a plain Euclid loop and by checking
// a*inv mod b = 1. The latency is checked against 1.44*16 + 4 clocks.
module tb_extended_euclidean;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [15:0] a, b, gcd, inv;
  logic busy, done, coprime;

  always #5 clk = ~clk;

  extended_euclidean #(.W(16)) dut (.*);

  function automatic int ref_gcd(input int x, input int y);
    while (y != 0) begin int t; t = x % y; x = y; y = t; end
    return x;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] x, input logic [15:0] y);
    int cyc, g;
    @(posedge clk);
    a <= x; b <= y; start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done && cyc < 200);
    g = ref_gcd(x, y);
    checks++;
    if (gcd != 16'(g) || coprime != (g == 1) || cyc > 27) begin
      failures++;
      $display("FAIL gcd(%0d,%0d): got %0d cop=%0d cycles=%0d", x, y, gcd, coprime, cyc);
    end
    if (g == 1 && y > 1) begin
      checks++;
      if ((32'(x) * 32'(inv)) % 32'(y) != 1 || inv >= y) begin
        failures++;
        $display("FAIL inv(%0d mod %0d) = %0d", x, y, inv);
      end
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(16'd20, 16'd15);
    checks++; if (gcd != 16'd5) failures++;
    run(16'd17, 16'd3120);   // classic 61*53 example: d = 2753
    checks++; if (inv != 16'd2753) begin failures++; $display("FAIL d=%0d", inv); end
    run(16'd3, 16'd20);
    run(16'd65535, 16'd65534);
    for (int t = 0; t < 3000; t++) run(16'($urandom), 16'($urandom) | 16'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
