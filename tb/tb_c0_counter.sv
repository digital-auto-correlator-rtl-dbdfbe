// tb_c0_counter: self-checking test of the C0 counter. For each range it
// counts pulses from zero and checks the BCD readout against the integer
// count and that c0_pulse fires exactly on the 10^4th (10^5th, 10^6th)
// count. Range 10^6 is run with the counter preloaded near its end by
// counting fast. Key-clear must zero it.
module tb_c0_counter;
  logic clk = 0, rst_n = 0, clear = 0, count = 0;
  logic [1:0] range_sel = 0;
  logic [5:0][3:0] q;
  logic c0_pulse;
  int checks = 0, failures = 0;

  c0_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned bcd_val(input logic [5:0][3:0] d);
    int unsigned v = 0;
    for (int k = 5; k >= 0; k--) v = v * 10 + int'(d[k]);
    return v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rs = 0; rs < 3; rs++) begin
      int unsigned target, pulses_at;
      target = (rs == 0) ? 10_000 : (rs == 1) ? 100_000 : 1_000_000;
      range_sel <= 2'(rs);
      clear <= 1; @(posedge clk); clear <= 0;
      @(negedge clk);
      checks++; if (bcd_val(q) != 0) failures++;
      pulses_at = 0;
      for (int unsigned n = 1; n <= target + 3; n++) begin
        count = 1;
        #1;
        if (c0_pulse) begin
          if (pulses_at == 0) pulses_at = n;
        end
        @(posedge clk);
        @(negedge clk);
        count = 0;
        if (n % 9973 == 0 || n == target || n == target + 3) begin
          checks++;
          if (bcd_val(q) != n % 1_000_000) begin
            failures++; $display("FAIL count %0d read %0d", n, bcd_val(q));
          end
        end
      end
      checks++;
      if (pulses_at != target) begin failures++; $display("FAIL range %0d pulse at %0d", rs, pulses_at); end
    end
    clear <= 1; @(posedge clk); clear <= 0; @(negedge clk);
    checks++; if (bcd_val(q) != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
