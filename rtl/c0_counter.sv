// c0_counter: the C0 counter, the measuring-time readout.
//
// Six BCD decades count completed computations (one count per T14 strobe,
// i.e. per sample pair). When the count reaches the selected C0, a one-clock
// c0_pulse is produced: range 0 -> 10^4, 1 -> 10^5, 2 -> 10^6 (3 is treated
// as 2). The pulse is the carry out of decade 4, 5 or 6; for 10^6 the six
// decades roll over to 000000. clear (Key-clear) zeroes the count. The
// original instrument uses a bought six-decade counter with a pulse output and a
// one-shot to narrow it; this block gives the same function in logic.
module c0_counter
  import corr_pkg::*;
#(
  parameter int unsigned NDIG = corr_pkg::DIGITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   count,
  input  logic [1:0]             range_sel,
  output logic [NDIG-1:0][3:0] q,
  output logic                   c0_pulse
);
  logic [NDIG-1:0] carry;
  logic [1:0]        rs;

  bcd_counter #(.DIGITS(NDIG)) u_cnt (
    .clk, .rst_n, .clear, .inc(count), .q, .carry_o(carry)
  );

  assign rs       = (range_sel == 2'd3) ? 2'd2 : range_sel;
  assign c0_pulse = carry[3 + 32'(rs)];
endmodule
