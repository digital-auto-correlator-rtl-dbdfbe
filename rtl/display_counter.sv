// display_counter: the decimal readout of the correlation function.
//
// Normal mode: six BCD decades count the carry pulses out of the MSB of the
// accumulator, so the readout is sum(r+s+2rs)/2^13 over the measurement.
// Frequency mode (freq_mode = 1): a second six-decade count of sampling
// pulses runs over repeated gates of GATE_CLKS system clocks; the readout
// shows the count of the last complete gate (with a 1 s gate, the sampling
// frequency in Hz). The correlation count is kept while frequency mode is
// shown. clear (Key-clear) zeroes the correlation count. The original instrument uses a
// bought counter with a frequency button; the gate length and keeping the
// correlation count are this design's choices.
module display_counter
  import corr_pkg::*;
#(
  parameter int unsigned NDIG      = corr_pkg::DIGITS,
  parameter int unsigned GATE_CLKS = 10_000_000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   count,
  input  logic                   freq_mode,
  input  logic                   sample_tick,
  output logic [NDIG-1:0][3:0] readout
);
  localparam int unsigned GW = $clog2(GATE_CLKS + 1);

  logic [NDIG-1:0][3:0] corr_q, freq_q, freq_hold;
  logic [NDIG-1:0]      unused_c1, unused_c2;
  logic [GW-1:0]          gate_cnt;
  logic                   gate_end;

  assign gate_end = freq_mode && (32'(gate_cnt) == GATE_CLKS - 1);

  bcd_counter #(.DIGITS(NDIG)) u_corr (
    .clk, .rst_n, .clear, .inc(count), .q(corr_q), .carry_o(unused_c1)
  );

  bcd_counter #(.DIGITS(NDIG)) u_freq (
    .clk, .rst_n, .clear(!freq_mode || gate_end), .inc(sample_tick),
    .q(freq_q), .carry_o(unused_c2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || !freq_mode) begin
      gate_cnt  <= '0;
      freq_hold <= '0;
    end else if (gate_end) begin
      gate_cnt  <= '0;
      freq_hold <= freq_q;
    end else begin
      gate_cnt  <= gate_cnt + 1'b1;
    end
  end

  assign readout = freq_mode ? freq_hold : corr_q;
endmodule
