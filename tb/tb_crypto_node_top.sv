// tb_crypto_node_top: end-to-end test of the whole design at its default
// sizes (16-bit RSA with 8-bit primes; ECC over GF(2^163) and the P-192
// prime field at 192 bits).
// RSA: the LFSRs are seeded, the processor finds p and q and derives the
// keys; messages are encrypted and decrypted and compared with a model. A
// second key generation uses e = 2, which must be rejected.
// ECC: random points on random curves in both fields; addition and doubling
// results are checked against the affine chord-and-tangent formulas.
// Counted mechanisms (each must occur): composite candidates rejected by
// the primality tester, accepted and rejected public exponents, encryption,
// decryption, binary/prime field selection with addition and doubling.
module tb_crypto_node_top;
  import vedic_pkg::*;
  import ec_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam fe_t   P192 = 192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff;
  localparam poly_t F163 = (poly_t'(1) << 163) | poly_t'(8'hC9);

  logic         rsa_shift_en, rsa_fill_sel, rsa_datain_p, rsa_datain_q, rsa_ds, rsa_ds2;
  logic [15:0]  rsa_e, rsa_indata, rsa_cypher, rsa_outdata, rsa_n, rsa_d;
  logic         rsa_ready1, rsa_ready2, rsa_keys_ready, rsa_key_ok;
  logic [7:0]   rsa_p, rsa_q;
  logic         ecc_start, ecc_sel_field, ecc_busy, ecc_done;
  ec_op_e       ecc_op;
  logic [191:0] ecc_x1, ecc_y1, ecc_z1, ecc_x2, ecc_y2, ecc_a, ecc_b;
  logic [191:0] ecc_out1, ecc_out2, ecc_out3;

  crypto_node_top dut (.*);

  // mechanism counters
  int n_composite = 0, n_key_ok = 0, n_key_bad = 0, n_enc = 0, n_dec = 0;
  int n_ec [4] = '{0, 0, 0, 0};

  always @(posedge clk)
    if (dut.u_rsa.m1.t_done && !dut.u_rsa.m1.t_prime) n_composite <= n_composite + 1;

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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rsa_keygen(input logic [7:0] sp, input logic [7:0] sq, input logic [15:0] e);
    int cyc;
    @(posedge clk);
    rsa_e <= e; rsa_fill_sel <= 1; rsa_shift_en <= 1;
    for (int i = 7; i >= 0; i--) begin
      rsa_datain_p <= sp[i]; rsa_datain_q <= sq[i];
      @(posedge clk);
    end
    rsa_fill_sel <= 0;
    repeat (2) @(posedge clk);
    cyc = 0;
    while (!rsa_keys_ready && cyc < 20000) begin @(posedge clk); cyc++; end
    checks++;
    if (!rsa_keys_ready || rsa_n != 16'(int'(rsa_p) * int'(rsa_q))) begin
      failures++;
      $display("FAIL keys: p=%0d q=%0d n=%0d", rsa_p, rsa_q, rsa_n);
    end
    if (rsa_key_ok) n_key_ok++; else n_key_bad++;
  endtask

  task automatic rsa_roundtrip(input logic [15:0] m);
    int cyc;
    @(posedge clk);
    rsa_indata <= m; rsa_ds <= 1;
    @(posedge clk);
    rsa_ds <= 0;
    @(posedge clk);
    cyc = 0;
    while (!rsa_ready1 && cyc < 20000) begin @(posedge clk); cyc++; end
    checks++;
    if (rsa_cypher != modexp(m, rsa_e, rsa_n)) begin
      failures++;
      $display("FAIL encrypt %0d: got %0d exp %0d", m, rsa_cypher, modexp(m, rsa_e, rsa_n));
    end else n_enc++;
    @(posedge clk);
    rsa_ds2 <= 1;
    @(posedge clk);
    rsa_ds2 <= 0;
    @(posedge clk);
    cyc = 0;
    while (!rsa_ready2 && cyc < 20000) begin @(posedge clk); cyc++; end
    checks++;
    if (rsa_outdata != m) begin
      failures++;
      $display("FAIL decrypt: got %0d exp %0d", rsa_outdata, m);
    end else n_dec++;
  endtask

  task automatic ecc_run(input bit prime, input bit dbl);
    ec_case_t c;
    int cyc;
    c = make_case(prime, dbl, P192, F163, 163);
    @(posedge clk);
    ecc_sel_field <= prime; ecc_op <= dbl ? EC_DBL : EC_ADD;
    ecc_x1 <= c.x1; ecc_y1 <= c.y1; ecc_z1 <= c.z1; ecc_x2 <= c.x2; ecc_y2 <= c.y2;
    ecc_a <= c.a; ecc_b <= c.b; ecc_start <= 1;
    @(posedge clk);
    ecc_start <= 0;
    cyc = 0;
    while (!ecc_done && cyc < 20000) begin @(posedge clk); cyc++; end
    checks++;
    if (!ecc_done || !check_case(c, prime, ecc_out1, ecc_out2, ecc_out3, P192, F163, 163)) begin
      failures++;
      $display("FAIL ecc prime=%0d dbl=%0d: got (%h,%h,%h)", prime, dbl, ecc_out1, ecc_out2, ecc_out3);
    end else n_ec[{prime, dbl}]++;
  endtask

  initial begin
    rsa_shift_en = 0; rsa_fill_sel = 0; rsa_datain_p = 0; rsa_datain_q = 0;
    rsa_ds = 0; rsa_ds2 = 0; rsa_e = 16'd17; rsa_indata = '0;
    ecc_start = 0; ecc_sel_field = 0; ecc_op = EC_ADD;
    ecc_x1 = '0; ecc_y1 = '0; ecc_z1 = '0; ecc_x2 = '0; ecc_y2 = '0; ecc_a = '0; ecc_b = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      begin
        rsa_keygen(8'h5A, 8'hC3, 16'd17);
        if (rsa_key_ok) begin
          rsa_roundtrip(16'b0000000001011101);
          rsa_roundtrip(16'($urandom) % rsa_n);
        end
        rsa_keygen(8'h21, 8'h7E, 16'd2);
        checks++;
        if (rsa_key_ok) begin failures++; $display("FAIL e = 2 accepted"); end
        rsa_keygen(8'h96, 8'h0F, 16'd4);    // even e: rejected
        rsa_keygen(8'h96, 8'h0F, 16'd257);
        if (rsa_key_ok) rsa_roundtrip(16'($urandom) % rsa_n);
      end
      begin
        for (int t = 0; t < 40; t++) ecc_run(t[1], t[0]);
      end
    join
    checks++;
    if (n_composite == 0 || n_key_ok == 0 || n_key_bad == 0 || n_enc == 0 || n_dec == 0) begin
      failures++;
      $display("FAIL RSA mechanism missing");
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_ec[i] == 0) begin failures++; $display("FAIL ECC operation %0d never passed", i); end
    end
    $display("composite candidates rejected %0d, keys accepted %0d rejected %0d, encryptions %0d, decryptions %0d",
             n_composite, n_key_ok, n_key_bad, n_enc, n_dec);
    $display("GF(2^163) add %0d dbl %0d, GF(P-192) add %0d dbl %0d", n_ec[0], n_ec[1], n_ec[2], n_ec[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
