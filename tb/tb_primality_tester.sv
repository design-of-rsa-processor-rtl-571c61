// tb_primality_tester: every 8-bit candidate is tested and compared with a
// reference trial-division loop; the latency is checked against the bound of
// 16 clocks.
module tb_primality_tester;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] cand;
  logic busy, done, is_prime;

  always #5 clk = ~clk;

  primality_tester #(.W(8)) dut (.*);

  function automatic logic ref_prime(input int v);
    if (v < 2) return 1'b0;
    for (int d = 2; d * d <= v; d++) if (v % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, nprimes;
    nprimes = 0;
    cand = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int v = 0; v < 256; v++) begin
      @(posedge clk);
      cand <= 8'(v); start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!done && cyc < 100);
      checks++;
      if (is_prime !== ref_prime(v) || cyc > 16) begin
        failures++;
        $display("FAIL %0d: is_prime=%0d cycles=%0d", v, is_prime, cyc);
      end
      if (is_prime) nprimes++;
    end
    checks++;
    if (nprimes != 54) begin failures++; $display("FAIL prime count %0d", nprimes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
