// tb_ecc_main_ctrl: protocol test of the main control unit with a
// behavioural arithmetic unit that answers au_start with au_done after a
// random delay. Checks the one-clock register-file load on start, the start
// of the arithmetic unit one clock later with the latched field and
// operation, that start is ignored while busy, and the done pulse.
module tb_ecc_main_ctrl;
  import vedic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, sel_field, rf_load, au_start, au_done, busy, done;
  ec_op_e op, au_op;
  field_e au_field;

  ecc_main_ctrl dut (.*);

  // behavioural arithmetic unit
  int delay_left;
  always @(posedge clk) begin
    au_done <= 1'b0;
    if (au_start) delay_left <= 1 + ($urandom % 20);
    else if (delay_left > 0) begin
      delay_left <= delay_left - 1;
      if (delay_left == 1) au_done <= 1'b1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, loads, starts;
    start = 0; sel_field = 0; op = EC_ADD; au_done = 0; delay_left = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      logic f;
      ec_op_e o;
      f = t[0];
      o = t[1] ? EC_DBL : EC_ADD;
      sel_field <= f; op <= o; start <= 1;
      #1;
      checks++;
      if (!rf_load) begin failures++; $display("FAIL no load on start"); end
      @(posedge clk);
      sel_field <= ~f; op <= t[1] ? EC_ADD : EC_DBL;   // must not be used
      start <= t[2];                                     // ignored while busy
      #1;
      checks++;
      if (!au_start || au_field != (f ? FIELD_PRIME : FIELD_BINARY) || au_op != o || !busy || rf_load) begin
        failures++;
        $display("FAIL au_start=%0d field=%0d op=%0d busy=%0d", au_start, au_field, au_op, busy);
      end
      @(posedge clk);
      start <= 0;
      cyc = 0; loads = 0; starts = 0;
      while (!done && cyc < 100) begin
        @(posedge clk); #1; cyc++;
        if (rf_load) loads++;
        if (au_start) starts++;
      end
      checks++;
      if (!done || loads != 0 || starts != 0) begin
        failures++;
        $display("FAIL done=%0d loads=%0d starts=%0d", done, loads, starts);
      end
      @(posedge clk); #1;
      checks++;
      if (busy || done) begin failures++; $display("FAIL not idle after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
