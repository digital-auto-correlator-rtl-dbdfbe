// tb_workload_signals: the correlator measuring the test signals of its
// performance tests: sine waves of 500 Hz, 1 kHz and 5 kHz, a 1 kHz
// rectangular wave, a 5 kHz sine plus noise and a 5 kHz rectangular wave
// plus noise, each with C0 = 10^4 sample pairs, swept over every delay
// m = 0..18, at a 40 kHz sampling rate.
//
// All correlator parameters are at their defaults except the key filter,
// shortened to 16 clocks to keep the run short. Every readout is compared
// with a reference model that sums r + s + 2rs over the same sample pairs.
// The shape is checked too: R(0) is the largest value of each sweep; for a
// 5 kHz sine (8 samples per period) R(8) is within 3 % of R(0) and R(4) is
// the smallest; for the 1 kHz rectangular wave (40 samples per period)
// R(m) does not rise over m = 0..18.
module tb_workload_signals;
  logic clk = 0, rst_n = 0;
  logic key_start_sw = 0, key_stop_sw = 0, key_clear_sw = 0, key_run_sw = 0;
  logic [4:0]  tau_m = 0;
  logic [15:0] sample_period = 250;
  logic ext_sample_sel = 0, ext_sample = 0, freq_mode = 0;
  logic [1:0]  c0_range = 0;
  logic adc_convert, adc_done, process_on, computing, sample_skipped;
  logic [5:0] adc_data;
  logic [5:0][3:0] corr_readout, c0_readout;
  logic [15:0] vin_mv = 0;
  int checks = 0, failures = 0;
  int sig = 0;
  longint unsigned cycle = 0;

  autocorrelator_top #(.DEB_CLKS(16)) dut (.*);
  adc_model adc (.clk, .rst_n, .convert(adc_convert), .vin_mv, .data(adc_data), .done(adc_done));
  always #50 clk = ~clk;

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // test signal: time in microseconds from the 10 MHz clock count
  function automatic int signal_mv(input int kind, input real t_us);
    real v, ph;
    int noise;
    noise = $urandom_range(0, 4000) - 2000;
    case (kind)
      0: v = 5000.0 + 4500.0 * $sin(2.0 * 3.14159265 * t_us / 2000.0);
      1: v = 5000.0 + 4500.0 * $sin(2.0 * 3.14159265 * t_us / 1000.0);
      2: v = 5000.0 + 4500.0 * $sin(2.0 * 3.14159265 * t_us / 200.0);
      3: begin ph = t_us - 1000.0 * $floor(t_us / 1000.0); v = (ph < 500.0) ? 8500.0 : 1500.0; end
      4: v = 5000.0 + 2500.0 * $sin(2.0 * 3.14159265 * t_us / 200.0) + real'(noise);
      default: begin ph = t_us - 200.0 * $floor(t_us / 200.0); v = ((ph < 100.0) ? 7500.0 : 2500.0) + real'(noise); end
    endcase
    if (v < 0.0) v = 0.0;
    if (v > 9999.0) v = 9999.0;
    return int'(v);
  endfunction

  int unsigned conv_n = 0, hist[32], pairs = 0;
  longint unsigned total = 0;
  always @(posedge clk) begin
    cycle++;
    vin_mv <= 16'(signal_mv(sig, real'(cycle) / 10.0));
    if (adc_done) begin
      conv_n++;
      hist[conv_n % 32] = int'(adc_data);
      if (process_on && !computing) begin
        total += longint'(hist[(conv_n + 32 - int'(tau_m)) % 32]) + longint'(adc_data)
               + 2 * longint'(hist[(conv_n + 32 - int'(tau_m)) % 32]) * longint'(adc_data);
        pairs++;
      end
    end
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
    repeat (30) @(posedge clk);
    sw = 0;
    repeat (30) @(posedge clk);
  endtask

  string names[6] = '{"sine 500 Hz", "sine 1 kHz", "sine 5 kHz", "rectangular 1 kHz",
                      "sine 5 kHz + noise", "rectangular 5 kHz + noise"};
  int unsigned res[19];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (sig = 0; sig < 6; sig++) begin
      string line;
      line = "";
      for (int m = 0; m <= 18; m++) begin
        tau_m = 5'(m);
        press(key_clear_sw);
        total = 0; pairs = 0;
        press(key_start_sw);
        while (process_on || computing) @(posedge clk);
        repeat (5) @(posedge clk);
        res[m] = bcd_val(corr_readout);
        check(res[m] == int'(total / 8192) && pairs == 10000,
              $sformatf("%s m=%0d: %0d expected %0d", names[sig], m, res[m], total / 8192));
        line = {line, $sformatf(" %0d", res[m])};
      end
      $display("%s: R(m), m=0..18:%s", names[sig], line);
      for (int m = 1; m <= 18; m++) check(res[0] >= res[m], $sformatf("%s: R(0) is the maximum", names[sig]));
      if (sig == 2) begin
        check(res[8] * 100 >= res[0] * 97, "5 kHz sine: R(8) close to R(0)");
        for (int m = 0; m <= 8; m++) check(res[4] <= res[m], "5 kHz sine: R(4) is the minimum");
      end
      if (sig == 3)
        for (int m = 1; m <= 18; m++) check(res[m] <= res[m-1], "rectangular: R(m) does not rise");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
