// tb_accumulator: self-checking test of the two-stage accumulator.
// Adds random 12-bit words with an ADD.T strobe followed by a Ca.T strobe
// and compares the 13-bit sum and the MSB carry pulse with plain integer
// arithmetic; also checks that Key-clear zeroes it and that a lone ADD.T is
// a bitwise exclusive-or.
module tb_accumulator;
  logic clk = 0, rst_n = 0, clear = 0, add_t = 0, ca_t = 0;
  logic [11:0] r_in = '0;
  logic [12:0] acc_q;
  logic carry_o;
  int checks = 0, failures = 0, carries = 0;
  int unsigned model;

  accumulator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    model = 0;
    for (int i = 0; i < 500; i++) begin
      logic [11:0] v;
      bit exp_c;
      v = 12'($urandom);
      if (i % 7 == 0) v = 12'hFFF;
      r_in <= v; add_t <= 1;
      @(posedge clk);
      add_t <= 0;
      @(negedge clk);
      check(acc_q == 13'(model ^ v), "half add is xor");
      @(posedge clk);
      ca_t <= 1;
      @(posedge clk);
      ca_t <= 0;
      exp_c = (model + int'(v)) >= 8192;
      model = (model + int'(v)) % 8192;
      @(negedge clk);
      check(acc_q == 13'(model), $sformatf("sum %0d got %0d", model, acc_q));
      check(carry_o == exp_c, "carry out");
      if (carry_o) carries++;
    end
    check(carries > 10, "overflow seen");
    clear <= 1; @(posedge clk); clear <= 0; @(negedge clk);
    check(acc_q == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
