// tb_autocorrelator_full: one complete measurement with every parameter of
// the correlator at its default (10 MHz clock assumed: 1 MHz slave clock,
// 10 ms key filter, 1 s frequency gate) and a 6 us A/D conversion.
//
// The instrument's own calibration check is reproduced: a DC input in level
// r = 40 (6.25 V .. 6.40625 V on the 10 V range), tau_m = 0 (mean square),
// C0 = 10^5 sample pairs at a 40 kHz sampling rate. The display must read
// floor(C0 * r(r+1) / 4096) = 40039 and the C0 counter 100000; the
// measurement must stop by itself; and every computation must last 15 slave
// clock periods (150 clocks). A second, shorter measurement with a sine
// input and tau_m = 4 (C0 = 10^4) is compared with a reference model that
// sums r + s + 2rs over the same sample pairs.
module tb_autocorrelator_full;
  logic clk = 0, rst_n = 0;
  logic key_start_sw = 0, key_stop_sw = 0, key_clear_sw = 0, key_run_sw = 0;
  logic [4:0]  tau_m = 0;
  logic [15:0] sample_period = 250;
  logic ext_sample_sel = 0, ext_sample = 0, freq_mode = 0;
  logic [1:0]  c0_range = 1;
  logic adc_convert, adc_done, process_on, computing, sample_skipped;
  logic [5:0] adc_data;
  logic [5:0][3:0] corr_readout, c0_readout;
  logic [15:0] vin_mv = 16'd6300;
  int checks = 0, failures = 0, ft_len = 0, bad_len = 0, skips = 0;
  bit sine = 0;

  autocorrelator_top dut (.*);
  adc_model adc (.clk, .rst_n, .convert(adc_convert), .vin_mv, .data(adc_data), .done(adc_done));
  always #50 clk = ~clk;   // 100 ns period: 10 MHz

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model for the sine measurement
  int unsigned conv_n = 0, hist[32], pairs = 0;
  longint unsigned total = 0;
  always @(posedge clk) begin
    if (adc_done) begin
      conv_n++;
      hist[conv_n % 32] = int'(adc_data);
      if (process_on && !computing) begin
        total += longint'(hist[(conv_n + 32 - int'(tau_m)) % 32]) + longint'(adc_data)
               + 2 * longint'(hist[(conv_n + 32 - int'(tau_m)) % 32]) * longint'(adc_data);
        pairs++;
      end
    end
    if (sample_skipped) skips++;
    if (computing) ft_len++;
    else if (ft_len != 0) begin
      if (ft_len != 150) bad_len++;
      ft_len = 0;
    end
    if (sine) vin_mv <= 16'(int'(5000.0 + 4500.0 * $sin(2.0 * 3.14159265 * $realtime / 1.0e6)));
  end

  function automatic int unsigned bcd_val(input logic [5:0][3:0] d);
    int unsigned v = 0;
    for (int k = 5; k >= 0; k--) v = v * 10 + int'(d[k]);
    return v;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic press(ref logic sw);
    sw = 1;
    repeat (100_020) @(posedge clk);
    sw = 0;
    repeat (100_020) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    press(key_clear_sw);
    check(bcd_val(corr_readout) == 0 && bcd_val(c0_readout) == 0, "cleared");
    press(key_start_sw);
    check(process_on, "process on");
    while (process_on || computing) @(posedge clk);
    repeat (5) @(posedge clk);   // the last carry reaches the display one clock later
    $display("DC r=40: display %0d, C0 %0d", bcd_val(corr_readout), bcd_val(c0_readout));
    check(bcd_val(corr_readout) == 40039, "display reads 40039");
    check(bcd_val(c0_readout) == 100000, "C0 reads 100000");
    check(bad_len == 0, "every computation lasts 150 clocks");
    check(skips == 0, "no sample skipped at 40 kHz");

    // sine input (1 kHz), tau_m = 4, C0 = 10^4
    sine = 1; tau_m = 4; c0_range = 0;
    press(key_clear_sw);
    total = 0; pairs = 0;
    press(key_start_sw);
    while (process_on || computing) @(posedge clk);
    repeat (5) @(posedge clk);   // the last carry reaches the display one clock later
    $display("sine m=4: display %0d expected %0d", bcd_val(corr_readout), total / 8192);
    check(bcd_val(corr_readout) == int'(total / 8192), "sine readout matches reference");
    check(pairs == 10000 && bcd_val(c0_readout) == 10000, "10^4 pairs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
