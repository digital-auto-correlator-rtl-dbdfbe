// tb_register_r: self-checking test of register R.
// Loads a random sample r, shifts once with C = 1 and five times with C = 0,
// and checks r, 2r+1 and (2r+1)*2^p after each step, up to the 12-bit
// maximum 4064 for r = 63.
module tb_register_r;
  logic clk = 0, rst_n = 0, clear = 0, f1_up = 0, a = 0, c = 0;
  logic [5:0] r_in = '0;
  logic [11:0] r_q;
  int checks = 0, failures = 0;

  register_r dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic strobe(input logic aa, input logic cc);
    a <= aa; c <= cc; f1_up <= 1;
    @(posedge clk);
    f1_up <= 0; a <= 0; c <= 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 100; i++) begin
      int unsigned v;
      v = (i == 0) ? 63 : $urandom_range(0, 63);
      r_in <= 6'(v);
      strobe(1, 0);
      check(r_q == 12'(v), "load r");
      r_in <= 6'(~v);
      @(posedge clk); @(negedge clk);
      check(r_q == 12'(v), "hold");
      strobe(0, 1);
      check(r_q == 12'(2 * v + 1), "form 2r+1");
      for (int p = 1; p <= 5; p++) begin
        strobe(0, 0);
        check(r_q == 12'((2 * v + 1) << p), $sformatf("(2r+1)*2^%0d", p));
      end
      if (v == 63) check(r_q == 12'd4064, "maximum 4064");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
