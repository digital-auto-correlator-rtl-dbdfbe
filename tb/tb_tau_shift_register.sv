// tb_tau_shift_register: self-checking test of the tau_m delay memory. Random
// words are shifted in at irregular intervals; after each shift stage k must
// hold the word shifted in k shifts ago, and nothing may move without a
// shift strobe.
module tb_tau_shift_register;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [5:0] din = '0;
  logic [17:0][5:0] taps;
  int checks = 0, failures = 0;
  logic [5:0] hist[$];

  tau_shift_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 18; i++) hist.push_front(6'd0);
    for (int i = 0; i < 300; i++) begin
      logic [5:0] v;
      v = 6'($urandom);
      @(negedge clk);
      din = v; shift = 1;
      @(negedge clk);
      shift = 0; din = ~v;
      hist.push_front(v);
      void'(hist.pop_back());
      for (int k = 0; k < 18; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin failures++; $display("FAIL shift %0d stage %0d", i, k + 1); end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      checks++; if (taps[0] !== hist[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
