// tb_nikhilam_mult: self-checking test of the Nikhilam multiplier.
// The 8-bit instance is checked exhaustively against the * operator,
// including the examples 10*20 = 200 and 12*12 = 144; a 16-bit instance is
// checked on random operands and on the extreme values.
module tb_nikhilam_mult;
  int checks = 0, failures = 0;

  logic [7:0]  x8, y8;
  logic [15:0] r8;
  logic [15:0] x16, y16;
  logic [31:0] r16;

  nikhilam_mult #(.W(8))  dut8  (.x(x8),  .y(y8),  .res(r8));
  nikhilam_mult #(.W(16)) dut16 (.x(x16), .y(y16), .res(r16));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x16 = '0; y16 = '0;
    x8 = 8'd10; y8 = 8'd20; #1;
    checks++; if (r8 != 16'd200) begin failures++; $display("FAIL 10*20 = %0d", r8); end
    x8 = 8'd12; y8 = 8'd12; #1;
    checks++; if (r8 != 16'd144) begin failures++; $display("FAIL 12*12 = %0d", r8); end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        x8 = 8'(x); y8 = 8'(y);
        #1;
        checks++;
        if (r8 != 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", x, y, r8);
        end
      end
    for (int t = 0; t < 20000; t++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      if (t == 0) begin x16 = 16'hFFFF; y16 = 16'hFFFF; end
      if (t == 1) begin x16 = 16'h8000; y16 = 16'h0001; end
      #1;
      checks++;
      if (r16 != 32'(x16) * 32'(y16)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d got %0d", x16, y16, r16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
