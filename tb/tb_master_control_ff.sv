// tb_master_control_ff: self-checking test of F_DO. Applies random
// combinations of Key-start, Key-stop, Key-clear, Key-run and the C0 pulse
// and compares F_DO with the set/reset equations (reset wins).
module tb_master_control_ff;
  logic clk = 0, rst_n = 0, key_start = 0, key_stop = 0, key_clear = 0, key_run = 0, c0_pulse = 0;
  logic fdo;
  int checks = 0, failures = 0, run_holds = 0;
  bit model = 0;

  master_control_ff dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++; if (fdo !== 0) failures++;
    for (int i = 0; i < 2000; i++) begin
      bit rst_req;
      key_start = ($urandom_range(0, 3) == 0);
      key_stop  = ($urandom_range(0, 9) == 0);
      key_clear = ($urandom_range(0, 19) == 0);
      key_run   = 1'($urandom);
      c0_pulse  = ($urandom_range(0, 5) == 0);
      rst_req = key_clear || key_stop || (c0_pulse && !key_run);
      if (model && c0_pulse && key_run && !key_stop && !key_clear) run_holds++;
      if (rst_req) model = 0; else if (key_start) model = 1;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (fdo !== model) begin failures++; $display("FAIL step %0d", i); end
    end
    checks++; if (run_holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
