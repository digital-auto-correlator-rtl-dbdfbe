// tb_slave_control_ff: self-checking test of F_T. A done pulse sets it only
// while F_DO = 1, T14 clears it, a done pulse during a computation is
// reported on sample_skipped and does not disturb it, Key-clear clears it.
module tb_slave_control_ff;
  logic clk = 0, rst_n = 0, key_clear = 0, fdo = 0, ad_done = 0, t14 = 0;
  logic ft, sample_skipped;
  int checks = 0, failures = 0, skips = 0;
  bit model = 0;

  slave_control_ff dut (.*);
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
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      bit exp_skip;
      fdo       = ($urandom_range(0, 7) != 0);
      ad_done   = ($urandom_range(0, 4) == 0);
      t14       = model && ($urandom_range(0, 3) == 0);
      key_clear = ($urandom_range(0, 49) == 0);
      #1;
      exp_skip = fdo && ad_done && model;
      checks++;
      if (sample_skipped !== exp_skip) begin failures++; $display("FAIL skip %0d", i); end
      if (exp_skip) skips++;
      if (key_clear) model = 0;
      else if (model && t14) model = 0;
      else if (!model && fdo && ad_done) model = 1;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (ft !== model) begin failures++; $display("FAIL ft %0d", i); end
    end
    checks++; if (skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
