// tb_key_filter: self-checking test of the key filter (DEB_CLKS = 20).
// A press with contact bounce shorter than the filter time must give one
// pulse and a high level; the bouncy release no pulse; a glitch shorter
// than the filter time nothing at all.
module tb_key_filter;
  logic clk = 0, rst_n = 0, key_raw = 0;
  logic level, pulse;
  int checks = 0, failures = 0, pulses = 0;

  key_filter #(.DEB_CLKS(20)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && pulse) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bounce(input logic final_v);
    repeat ($urandom_range(3, 8)) begin
      key_raw <= ~key_raw;
      repeat ($urandom_range(1, 15)) @(posedge clk);
    end
    key_raw <= final_v;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (50) @(posedge clk);
    for (int i = 0; i < 30; i++) begin
      pulses = 0;
      bounce(1);
      repeat (($urandom_range(0, 1) == 1) ? 30 : 400) @(posedge clk);
      checks++; if (pulses != 1 || level != 1) begin failures++; $display("FAIL press %0d pulses %0d", i, pulses); end
      bounce(0);
      repeat (60) @(posedge clk);
      checks++; if (pulses != 1 || level != 0) begin failures++; $display("FAIL release %0d", i); end
      key_raw <= 1; repeat ($urandom_range(1, 15)) @(posedge clk); key_raw <= 0;
      repeat (60) @(posedge clk);
      checks++; if (pulses != 1 || level != 0) begin failures++; $display("FAIL glitch %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
