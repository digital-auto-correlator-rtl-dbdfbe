// autocorrelator_top: the digital auto-correlator.
//
// Measures R(tau_m) = E[x(t) x(t + tau_m)] of one input, tau_m = m*T with
// m = 0..18, by accumulating for every sample pair (r, s) the weighting
// number r + s + 2rs = r + (2r+1)s and counting the accumulator's overflows.
//
// Data path: at each sampling pulse the A/D converter (outside this module,
// ports adc_*) is started and the tau_m shift register takes the A/D's
// previous result. When the A/D signals done and the process is ON (F_DO),
// F_T starts a computation: register S takes the new sample s, register R
// the sample r from the tau_m select switch (the sample m intervals older),
// and the control counter steps through 14 slave clock pulses that add r,
// then (2r+1)*2^p for every bit p of s that is 1, into the 13-bit
// accumulator with its two-stage adder. Each carry out of the accumulator
// MSB advances the display counter, so the readout is
// sum(r+s+2rs) / 2^13; the C0 counter counts the pairs and stops the
// measurement (resets F_DO) at 10^4, 10^5 or 10^6 pairs unless Key-run is on.
// For a DC input at level r the readout is floor(C0 * r(r+1) / 4096).
//
// Interface: clk is the system clock, assumed 10 MHz (so CP_DIV = 10 gives
// the original instrument's 1 MHz slave clock and DEB_CLKS = 100000 a 10 ms key
// filter). Keys are raw, active-high switch levels. sample_period is the
// sampling interval T in clocks. The A/D model must hold adc_data stable
// from its done pulse until the next convert pulse.
// Timing: one computation takes 15*CP_DIV + 1 clocks from the done pulse to
// the fall of F_T. A done pulse that arrives while a computation is still
// running is skipped (pulse on sample_skipped) and not counted.
// What follows the original instrument: the block structure, widths, the control
// pulse equations, the shift-and-add order and the two-stage adder. This
// design's own: a single synchronous clock with strobes instead of ripple
// clocks and one-shots, the key filters, the skip rule and the power-on
// reset.
module autocorrelator_top
  import corr_pkg::*;
#(
  parameter int unsigned CP_DIV    = 10,
  parameter int unsigned DEB_CLKS  = 100_000,
  parameter int unsigned GATE_CLKS = 10_000_000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   key_start_sw,
  input  logic                   key_stop_sw,
  input  logic                   key_clear_sw,
  input  logic                   key_run_sw,
  input  logic [4:0]             tau_m,
  input  logic [15:0]            sample_period,
  input  logic                   ext_sample_sel,
  input  logic                   ext_sample,
  input  logic [1:0]             c0_range,
  input  logic                   freq_mode,
  output logic                   adc_convert,
  input  logic [AD_W-1:0]        adc_data,
  input  logic                   adc_done,
  output logic [DIGITS-1:0][3:0] corr_readout,
  output logic [DIGITS-1:0][3:0] c0_readout,
  output logic                   process_on,
  output logic                   computing,
  output logic                   sample_skipped
);
  logic key_start, key_stop, key_clear, key_run;
  logic unused_start_lvl, unused_stop_lvl, unused_clear_lvl, unused_run_pulse;
  logic sample_tick, cp, s_lsb, acc_carry, c0_pulse;
  logic [3:0] cnt;
  ctrl_t ctrl;
  logic [TAU_STAGES-1:0][AD_W-1:0] taps;
  logic [AD_W-1:0]  r_sel;
  logic [S_W-1:0]   s_q;
  logic [R_W-1:0]   r_q;
  logic [ACC_W-1:0] acc_q;

  // ---- operator keys ------------------------------------------------------
  key_filter #(.DEB_CLKS(DEB_CLKS)) u_kstart (
    .clk, .rst_n, .key_raw(key_start_sw), .level(unused_start_lvl), .pulse(key_start));
  key_filter #(.DEB_CLKS(DEB_CLKS)) u_kstop (
    .clk, .rst_n, .key_raw(key_stop_sw), .level(unused_stop_lvl), .pulse(key_stop));
  key_filter #(.DEB_CLKS(DEB_CLKS)) u_kclear (
    .clk, .rst_n, .key_raw(key_clear_sw), .level(unused_clear_lvl), .pulse(key_clear));
  key_filter #(.DEB_CLKS(DEB_CLKS)) u_krun (
    .clk, .rst_n, .key_raw(key_run_sw), .level(key_run), .pulse(unused_run_pulse));

  // ---- sampling and delay memory ----------------------------------------
  sampling_pulse_gen u_sample (
    .clk, .rst_n, .period(sample_period), .ext_sel(ext_sample_sel),
    .ext_in(ext_sample), .sample_tick);
  assign adc_convert = sample_tick;

  tau_shift_register #(.STAGES(TAU_STAGES), .W(AD_W)) u_tau (
    .clk, .rst_n, .shift(sample_tick), .din(adc_data), .taps);

  tau_select #(.STAGES(TAU_STAGES), .W(AD_W)) u_sel (
    .m(tau_m), .direct(adc_data), .taps, .r_out(r_sel));

  // ---- control --------------------------------------------------------------
  master_control_ff u_fdo (
    .clk, .rst_n, .key_start, .key_stop, .key_clear, .key_run, .c0_pulse,
    .fdo(process_on));

  slave_control_ff u_ft (
    .clk, .rst_n, .key_clear, .fdo(process_on), .ad_done(adc_done),
    .t14(ctrl.t14), .ft(computing), .sample_skipped);

  slave_clock_gen #(.CP_DIV(CP_DIV)) u_cp (
    .clk, .rst_n, .ft(computing), .cp);

  control_counter u_ctl (
    .clk, .rst_n, .ft(computing), .cp, .s_lsb, .cnt, .ctrl);

  // ---- computing logic ------------------------------------------------------
  register_s #(.W(AD_W)) u_s (
    .clk, .rst_n, .clear(key_clear), .f1_up(ctrl.f1_up), .a(ctrl.a),
    .ad_in(adc_data), .s_q, .s_lsb);

  register_r #(.W_IN(AD_W), .W(R_W)) u_r (
    .clk, .rst_n, .clear(key_clear), .f1_up(ctrl.f1_up), .a(ctrl.a),
    .c(ctrl.c), .r_in(r_sel), .r_q);

  accumulator #(.AW(ACC_W), .RW(R_W)) u_acc (
    .clk, .rst_n, .clear(key_clear), .add_t(ctrl.add_t), .ca_t(ctrl.ca_t),
    .r_in(r_q), .acc_q, .carry_o(acc_carry));

  // ---- readouts -------------------------------------------------------------
  c0_counter #(.NDIG(DIGITS)) u_c0 (
    .clk, .rst_n, .clear(key_clear), .count(ctrl.t14), .range_sel(c0_range),
    .q(c0_readout), .c0_pulse);

  display_counter #(.NDIG(DIGITS), .GATE_CLKS(GATE_CLKS)) u_disp (
    .clk, .rst_n, .clear(key_clear), .count(acc_carry), .freq_mode,
    .sample_tick, .readout(corr_readout));
endmodule
