// tb_ec_regfile: random writes, parallel loads and reads of the register
// file compared with a shadow array; the result taps must follow words
// 7, 8 and 9.
module tb_ec_regfile;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int W = 32;
  logic         load, we;
  logic [W-1:0] load_data [NLOAD];
  logic [3:0]   waddr, raddr_a, raddr_b;
  logic [W-1:0] wdata, rdata_a, rdata_b, out_x, out_y, out_z;
  logic [W-1:0] shadow [NREG];

  ec_regfile #(.W(W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; we = 0; waddr = '0; raddr_a = '0; raddr_b = '0; wdata = '0;
    for (int i = 0; i < NLOAD; i++) load_data[i] = '0;
    for (int i = 0; i < NREG; i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      logic l, w;
      logic [3:0] wa;
      logic [W-1:0] wd;
      l  = ($urandom % 8) == 0;
      w  = $urandom % 2;
      wa = 4'($urandom);
      wd = $urandom;
      load <= l; we <= w; waddr <= wa; wdata <= wd;
      for (int i = 0; i < NLOAD; i++) load_data[i] <= $urandom;
      @(posedge clk);
      #1;
      if (w) shadow[wa] = wd;
      if (l) for (int i = 0; i < NLOAD; i++) shadow[i] = load_data[i];
      load <= 0; we <= 0;
      raddr_a = 4'($urandom); raddr_b = 4'($urandom);
      #1;
      checks++;
      if (rdata_a != shadow[raddr_a] || rdata_b != shadow[raddr_b] ||
          out_x != shadow[R_X3] || out_y != shadow[R_Y3] || out_z != shadow[R_Z3]) begin
        failures++;
        $display("FAIL read %0d/%0d", raddr_a, raddr_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
