// tb_slave_clock_gen: self-checking test of the gated slave clock. For
// several divider settings it checks that no cp strobe appears while F_T = 0
// and that with F_T = 1 the strobes come exactly every CP_DIV clocks,
// starting so that the first one is acted on at the CP_DIV-th clock edge
// after F_T rises.
module tb_slave_clock_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ft = 0;
  logic cp10, cp3, cp1;

  slave_clock_gen                dut10 (.clk, .rst_n, .ft, .cp(cp10));
  slave_clock_gen #(.CP_DIV(3))  dut3  (.clk, .rst_n, .ft, .cp(cp3));
  slave_clock_gen #(.CP_DIV(1))  dut1  (.clk, .rst_n, .ft, .cp(cp1));
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
    for (int run = 0; run < 20; run++) begin
      int len;
      len = $urandom_range(5, 300);
      @(negedge clk);
      ft = 0;
      repeat ($urandom_range(1, 13)) begin
        @(negedge clk);
        checks++; if (cp10 || cp3 || cp1) failures++;
      end
      ft = 1;
      for (int n = 1; n <= len; n++) begin
        @(posedge clk);
        @(negedge clk);
        checks++;
        if (cp10 !== (n % 10 == 9) || cp3 !== (n % 3 == 2) || cp1 !== 1'b1) begin
          failures++; $display("FAIL run %0d clock %0d", run, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
