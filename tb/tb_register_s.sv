// tb_register_s: self-checking test of register S.
// Loads random samples with A = 1 and then shifts with A = 0; after the
// load the LSB is the dummy 0, and after shift k it must be bit k-1 of the
// sample. Strobes without f1_up must not change the register.
module tb_register_s;
  logic clk = 0, rst_n = 0, clear = 0, f1_up = 0, a = 0;
  logic [5:0] ad_in = '0;
  logic [6:0] s_q;
  logic s_lsb;
  int checks = 0, failures = 0;

  register_s dut (.*);
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 100; i++) begin
      logic [5:0] v;
      v = 6'($urandom);
      ad_in <= v; a <= 1; f1_up <= 1;
      @(posedge clk);
      f1_up <= 0; ad_in <= ~v;
      @(negedge clk);
      check(s_q == {v, 1'b0} && s_lsb == 0, "load with dummy bit");
      @(posedge clk);
      @(negedge clk);
      check(s_q == {v, 1'b0}, "hold without strobe");
      for (int k = 0; k < 6; k++) begin
        a <= 0; f1_up <= 1;
        @(posedge clk);
        f1_up <= 0;
        @(negedge clk);
        check(s_lsb == v[k], $sformatf("bit %0d at LSB", k));
      end
    end
    clear <= 1; @(posedge clk); clear <= 0; @(negedge clk);
    check(s_q == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
