// tb_rsa_processor: end-to-end test of the RSA processor.
// For several LFSR seeds: seed serially, let the processor find p and q and
// derive the keys, check n = p*q, e*d = 1 mod (p-1)(q-1), then encrypt
// messages with ds, check the cypher against a model of M^e mod n, decrypt
// it with ds2 and check that the message comes back. One run uses e = 2,
// which shares a factor with phi and must be reported as unusable.
module tb_rsa_processor;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        shift_en, fill_sel, datain_p, datain_q, ds, ds2;
  logic [15:0] e_in, indata, cypher, outdata, n, d;
  logic        ready1, ready2, keys_ready, key_ok;
  logic [7:0]  p, q;

  rsa_processor dut (.*);

  function automatic logic [15:0] modexp(input logic [15:0] m, input logic [15:0] e,
                                         input logic [15:0] nn);
    logic [31:0] r, base;
    r = 32'd1 % 32'(nn);
    base = 32'(m) % 32'(nn);
    for (int i = 0; i < 16; i++) begin
      if (e[i]) r = (r * base) % 32'(nn);
      base = (base * base) % 32'(nn);
    end
    return r[15:0];
  endfunction

  function automatic int gcd(input int x, input int y);
    while (y != 0) begin int t; t = x % y; x = y; y = t; end
    return x;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sp, sq;
    logic [15:0] m, e, exp_c;
    int phi, cyc;
    shift_en = 0; fill_sel = 0; datain_p = 0; datain_q = 0; ds = 0; ds2 = 0;
    e_in = 16'd17; indata = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 6; s++) begin
      sp = 8'($urandom); sq = 8'($urandom);
      // e: 2 in the last run (never coprime with an even phi), else an odd
      // value chosen so that it is coprime with most phi
      e = (s == 5) ? 16'd2 : ((s % 2 == 0) ? 16'd17 : 16'd257);
      @(posedge clk);
      e_in <= e;
      fill_sel <= 1; shift_en <= 1;
      for (int i = 7; i >= 0; i--) begin
        datain_p <= sp[i]; datain_q <= sq[i];
        @(posedge clk);
      end
      fill_sel <= 0;
      repeat (2) @(posedge clk);
      cyc = 0;
      while (!keys_ready && cyc < 20000) begin @(posedge clk); cyc++; end
      phi = (int'(p) - 1) * (int'(q) - 1);
      checks++;
      if (!keys_ready || n != 16'(int'(p) * int'(q))) begin
        failures++;
        $display("FAIL keys: ready=%0d p=%0d q=%0d n=%0d", keys_ready, p, q, n);
      end
      checks++;
      if (key_ok != (gcd(int'(e), phi) == 1 && e > 1 && int'(e) < phi)) begin
        failures++;
        $display("FAIL key_ok=%0d for e=%0d phi=%0d", key_ok, e, phi);
      end
      if (!key_ok) continue;
      checks++;
      if ((int'(d) * int'(e)) % phi != 1) begin
        failures++;
        $display("FAIL d=%0d e=%0d phi=%0d", d, e, phi);
      end
      for (int t = 0; t < 4; t++) begin
        m = 16'($urandom) % n;
        if (t == 0) m = 16'b0000000001011101;
        @(posedge clk);
        indata <= m; ds <= 1;
        @(posedge clk);
        ds <= 0;
        @(posedge clk);
        cyc = 0;
        while (!ready1 && cyc < 20000) begin @(posedge clk); cyc++; end
        exp_c = modexp(m, e, n);
        checks++;
        if (cypher != exp_c) begin
          failures++;
          $display("FAIL encrypt %0d: got %0d exp %0d", m, cypher, exp_c);
        end
        @(posedge clk);
        ds2 <= 1;
        @(posedge clk);
        ds2 <= 0;
        @(posedge clk);
        cyc = 0;
        while (!ready2 && cyc < 20000) begin @(posedge clk); cyc++; end
        checks++;
        if (outdata != m) begin
          failures++;
          $display("FAIL decrypt: got %0d exp %0d (n=%0d d=%0d)", outdata, m, n, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
