// tb_autocorrelator_top: end-to-end test of the whole correlator at reduced
// timing parameters (slave clock every 2 clocks, 4-clock key filter,
// 6-clock A/D conversion, 2000-clock frequency gate).
//
// A reference model in this testbench watches the A/D model: it numbers the
// conversions, keeps their levels, and for every done pulse that starts a
// computation (F_DO = 1, F_T = 0) adds r + s + 2rs, with s the new level and
// r the level m conversions earlier. After each measurement the display must
// read floor(total / 8192) and the C0 counter the number of pairs.
// Phases: a DC input (also checked against the closed form
// floor(C0 r(r+1) / 4096)), a random input, a sampling rate too fast for the
// computation (skipped samples), Key-run with Key-stop, external sampling
// pulses with a sine input, Key-clear in the middle of a measurement, and
// frequency mode. Every computation must keep F_T high for exactly
// 15 slave clock periods (14 pulses and the closing T14 strobe). Each mechanism is counted and must occur at least once.
module tb_autocorrelator_top;
  localparam int CP_DIV = 2, CONV = 6, DEB = 4;
  logic clk = 0, rst_n = 0;
  logic key_start_sw = 0, key_stop_sw = 0, key_clear_sw = 0, key_run_sw = 0;
  logic [4:0]  tau_m = 0;
  logic [15:0] sample_period = 40;
  logic ext_sample_sel = 0, ext_sample = 0, freq_mode = 0;
  logic [1:0]  c0_range = 0;
  logic adc_convert, adc_done, process_on, computing, sample_skipped;
  logic [5:0] adc_data;
  logic [5:0][3:0] corr_readout, c0_readout;
  logic [15:0] vin_mv = 0;

  int checks = 0, failures = 0;
  int n_c0_stop = 0, n_key_stop = 0, n_skip = 0, n_ext = 0, n_freq = 0, n_carry = 0, n_clear_mid = 0;

  autocorrelator_top #(.CP_DIV(CP_DIV), .DEB_CLKS(DEB), .GATE_CLKS(2000)) dut (.*);
  adc_model #(.CONV_CLKS(CONV)) adc (.clk, .rst_n, .convert(adc_convert), .vin_mv,
                                     .data(adc_data), .done(adc_done));
  always #5 clk = ~clk;

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ---------------------------------------------------
  int unsigned conv_n = 0;
  int unsigned hist[64];
  longint unsigned total = 0;
  int unsigned pairs = 0;
  int ft_len = 0;
  always @(posedge clk) begin
    if (adc_done) begin
      hist[(conv_n + 1) % 64] = int'(adc_data);
      conv_n++;
      if (process_on && !computing) begin
        int unsigned r, s;
        s = int'(adc_data);
        r = hist[(conv_n + 64 - int'(tau_m)) % 64];
        total += longint'(r) + longint'(s) + 2 * longint'(r) * longint'(s);
        pairs++;
      end
    end
    if (sample_skipped) n_skip++;
    // one computation: 14 slave clock pulses plus the closing T14 strobe
    if (dut.key_clear) ft_len = 0;        // an aborted computation is not timed
    else if (computing) ft_len++;
    else if (ft_len != 0) begin
      checks++;
      if (ft_len != 15 * CP_DIV) begin
        failures++; $display("FAIL computation took %0d clocks", ft_len);
      end
      ft_len = 0;
    end
    if (dut.acc_carry) n_carry++;
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
    repeat (DEB + 6) @(posedge clk);
    sw = 0;
    repeat (DEB + 6) @(posedge clk);
  endtask

  task automatic clear_all();
    press(key_clear_sw);
    total = 0;
    pairs = 0;
    check(bcd_val(corr_readout) == 0 && bcd_val(c0_readout) == 0 && !process_on, "cleared");
  endtask

  task automatic wait_idle();
    while (process_on || computing) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  task automatic check_result(input string what);
    check(bcd_val(corr_readout) == int'(total / 8192),
          $sformatf("%s: display %0d expected %0d", what, bcd_val(corr_readout), total / 8192));
    check(bcd_val(c0_readout) == pairs % 1_000_000,
          $sformatf("%s: C0 %0d expected %0d", what, bcd_val(c0_readout), pairs));
  endtask

  // input waveform driver: mode 0 DC, 1 random, 2 sine
  int wave_mode = 0;
  int unsigned dc_mv = 0;
  always @(posedge clk) begin
    case (wave_mode)
      0: vin_mv <= 16'(dc_mv);
      1: vin_mv <= 16'($urandom_range(0, 9999));
      default: vin_mv <= 16'(int'(5000.0 + 4900.0 * $sin(2.0 * 3.14159265 * $time / 10.0 / 700.0)));
    endcase
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);   // fill the delay memory

    // ---- 1: DC input, m = 3, stop at C0 = 10^4 -----------------------------
    wave_mode = 0; dc_mv = 3990;    // level 25
    repeat (2000) @(posedge clk);
    tau_m = 3;
    clear_all();
    press(key_start_sw);
    check(process_on, "F_DO set by Key-start");
    wait_idle();
    n_c0_stop++;
    check_result("DC");
    check(bcd_val(corr_readout) == (10000 * 25 * 26) / 4096, "DC closed form");
    check(pairs == 10000, "C0 = 10^4 pairs");

    // ---- 2: random input, m = 5 -------------------------------------------
    wave_mode = 1; tau_m = 5;
    clear_all();
    press(key_start_sw);
    wait_idle();
    n_c0_stop++;
    check_result("random");

    // ---- 3: sampling faster than the computation, m = 18 -------------------
    sample_period = 20; tau_m = 18;
    begin
      int skips0;
      skips0 = n_skip;
      clear_all();
      press(key_start_sw);
      wait_idle();
      check(n_skip > skips0, "samples skipped at a fast rate");
    end
    check_result("fast sampling");
    sample_period = 40;

    // ---- 4: Key-run, then Key-stop ---------------------------------------
    key_run_sw = 1; tau_m = 1;
    repeat (DEB + 6) @(posedge clk);
    clear_all();
    press(key_start_sw);
    while (pairs < 12000) @(posedge clk);
    check(process_on, "Key-run keeps the process on past C0");
    press(key_stop_sw);
    wait_idle();
    n_key_stop++;
    check(pairs > 10000, "ran past C0");
    check_result("Key-run");
    key_run_sw = 0;
    repeat (DEB + 6) @(posedge clk);

    // ---- 5: external sampling pulses, sine input, m = 2 --------------------
    wave_mode = 2; tau_m = 2; ext_sample_sel = 1;
    fork
      begin
        while (ext_sample_sel) begin
          repeat (21) @(posedge clk); ext_sample = 1;
          repeat (27) @(posedge clk); ext_sample = 0;
          n_ext++;
        end
      end
      begin
        clear_all();
        press(key_start_sw);
        wait_idle();
        check_result("external sampling");
        ext_sample_sel = 0;
      end
    join

    // ---- 6: Key-clear in the middle of a measurement ----------------------
    wave_mode = 1; tau_m = 7;
    clear_all();
    press(key_start_sw);
    repeat (30000) @(posedge clk);
    press(key_clear_sw);
    n_clear_mid++;
    total = 0; pairs = 0;
    repeat (100) @(posedge clk);
    check(!process_on && bcd_val(c0_readout) == 0 && bcd_val(corr_readout) == 0, "Key-clear aborts");
    press(key_start_sw);
    wait_idle();
    check_result("after abort");

    // ---- 7: frequency mode -------------------------------------------------
    freq_mode = 1;
    repeat (4500) @(posedge clk);
    check(bcd_val(corr_readout) == 2000 / 40, "frequency mode shows samples per gate");
    n_freq++;
    freq_mode = 0;
    @(posedge clk);
    check_result("after frequency mode");

    // ---- mechanisms ---------------------------------------------------------
    $display("mechanisms: c0_stop=%0d key_stop=%0d skip=%0d ext=%0d freq=%0d carry=%0d clear_mid=%0d",
             n_c0_stop, n_key_stop, n_skip, n_ext, n_freq, n_carry, n_clear_mid);
    check(n_c0_stop > 0, "C0 stop happened");
    check(n_key_stop > 0, "Key-stop happened");
    check(n_skip > 0, "skip happened");
    check(n_ext > 0, "external sampling happened");
    check(n_freq > 0, "frequency mode happened");
    check(n_carry > 0, "accumulator carries happened");
    check(n_clear_mid > 0, "mid-measurement clear happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
