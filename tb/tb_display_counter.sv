// tb_display_counter: self-checking test of the display counter.
// Normal mode: random carry pulses are counted and the BCD readout is
// compared with the integer count after every clock, including a clear in
// the middle and the roll-over from 999999 to 000000. Frequency mode (gate
// of 1000 clocks): sampling ticks every 10 and every 8 clocks must read 100
// and 125 after each complete gate, while carries arriving meanwhile must
// still be counted. Leaving frequency mode must show the correlation count.
module tb_display_counter;
  logic clk = 0, rst_n = 0, clear = 0, count = 0, freq_mode = 0, sample_tick = 0;
  logic [5:0][3:0] readout;
  int checks = 0, failures = 0;
  int unsigned n = 0;
  int tick_div = 10;

  display_counter #(.GATE_CLKS(1000)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned bcd_val(input logic [5:0][3:0] d);
    int unsigned v = 0;
    for (int k = 5; k >= 0; k--) v = v * 10 + int'(d[k]);
    return v;
  endfunction

  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt + 1 >= tick_div) ? 0 : tcnt + 1;
    sample_tick <= (tcnt + 1 >= tick_div);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: read %0d, count %0d", what, bcd_val(readout), n);
    end
  endtask

  // One clock of random carries, then the readout must equal the count.
  task automatic step_random(input int per);
    @(negedge clk);
    check(bcd_val(readout) == n % 1000000, "correlation count");
    count = ($urandom_range(0, per - 1) == 0);
    if (count) n++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 20000; i++) step_random(3);
    // Key-clear in the middle of a measurement.
    @(negedge clk); count = 0; clear = 1;
    @(negedge clk); clear = 0; n = 0;
    check(bcd_val(readout) == 0, "cleared");
    for (int i = 0; i < 5000; i++) step_random(2);
    // Run up to the roll-over: 999999 + 1 reads 000000.
    while (n < 1000010) begin
      @(negedge clk);
      if (n % 997 == 0 || n > 999990) check(bcd_val(readout) == n % 1000000, "approach roll-over");
      count = 1; n++;
    end
    @(negedge clk); count = 0;
    check(bcd_val(readout) == n % 1000000, "after roll-over");
    // Frequency mode; carries keep arriving and must not be lost.
    freq_mode = 1;
    for (int g = 0; g < 6; g++) begin
      if (g == 3) tick_div = 8;
      repeat (1000) begin
        @(negedge clk);
        count = ($urandom_range(0, 3) == 0);
        if (count) n++;
      end
      // The first complete gate after a change of rate may hold a mixed count.
      if (g != 0 && g != 3)
        check(bcd_val(readout) == (g < 3 ? 100 : 125), "frequency readout");
    end
    @(negedge clk); count = 0;
    freq_mode = 0;
    @(negedge clk);
    check(bcd_val(readout) == n % 1000000, "count kept in frequency mode");
    clear = 1; @(negedge clk); clear = 0; @(negedge clk);
    check(bcd_val(readout) == 0, "final clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
