// tb_sampling_pulse_gen: self-checking test of the sampling pulse generator.
// Internal mode: measures the clocks between sample_tick pulses for several
// periods. External mode: counts one tick per rising edge of a slow
// external square wave, with no tick on its falling edges.
module tb_sampling_pulse_gen;
  logic clk = 0, rst_n = 0, ext_sel = 0, ext_in = 0;
  logic [15:0] period = 16'd10;
  logic sample_tick;
  int checks = 0, failures = 0;

  sampling_pulse_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (periods[i]) begin
      int last, n;
      period <= 16'(periods[i]);
      // let the new period take hold
      repeat (2 * periods[i] + 3) @(posedge clk);
      last = -1; n = 0;
      for (int t = 0; t < 6 * periods[i] + 2; t++) begin
        @(negedge clk);
        if (sample_tick) begin
          if (last >= 0) begin
            checks++;
            if (t - last != periods[i]) begin
              failures++; $display("FAIL period %0d gap %0d", periods[i], t - last);
            end
          end
          last = t; n++;
        end
      end
      checks++; if (n < 5) failures++;
    end
    ext_sel <= 1;
    begin
      int ticks;
      ticks = 0;
      fork
        for (int e = 0; e < 25; e++) begin
          repeat (17) @(posedge clk); ext_in <= 1;
          repeat (23) @(posedge clk); ext_in <= 0;
        end
        repeat (25 * 40 + 10) @(negedge clk) if (sample_tick) ticks++;
      join
      checks++;
      if (ticks != 25) begin failures++; $display("FAIL ext ticks %0d", ticks); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int periods[5] = '{10, 2, 37, 200, 1000};
endmodule
