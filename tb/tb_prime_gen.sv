// tb_prime_gen: seeds the two LFSRs serially with several seeds, lets the
// generator search, and checks that p and q are distinct 8-bit primes with
// the top bit set, that ready rises, and that a new seed restarts the search.
module tb_prime_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic shift_en = 0, fill_sel = 0, datain_p = 0, datain_q = 0;
  logic [7:0] p_out, q_out;
  logic ready;

  always #5 clk = ~clk;

  prime_gen #(.W(8)) dut (.*);

  function automatic logic ref_prime(input int v);
    if (v < 2) return 1'b0;
    for (int d = 2; d * d <= v; d++) if (v % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sp, sq;
    int cyc;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 40; t++) begin
      sp = 8'($urandom); sq = 8'($urandom);
      if (t == 0) begin sp = 8'd0; sq = 8'd0; end
      @(posedge clk);
      fill_sel <= 1; shift_en <= 1;
      for (int i = 7; i >= 0; i--) begin
        datain_p <= sp[i]; datain_q <= sq[i];
        @(posedge clk);
      end
      fill_sel <= 0;
      @(posedge clk);
      checks++;
      if (ready) begin failures++; $display("FAIL ready during restart"); end
      cyc = 0;
      while (!ready && cyc < 5000) begin @(posedge clk); cyc++; end
      checks++;
      if (!ready || !ref_prime(p_out) || !ref_prime(q_out) || p_out == q_out ||
          !p_out[7] || !q_out[7]) begin
        failures++;
        $display("FAIL seed %0d/%0d: p=%0d q=%0d ready=%0d", sp, sq, p_out, q_out, ready);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
