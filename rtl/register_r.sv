// register_r: register R, the multiplicand (2r+1)*2^p.
//
// W bits. On each leading edge of F1 (strobe f1_up) it loads the delayed
// sample r from the tau_m select switch (control pulse A=1), or shifts one
// place toward the MSB (A=0), feeding control pulse C into the LSB. C is 1
// only on the first shift, which turns r into 2r+1; later shifts double it.
// Six doublings of at most 127 give 4064, so 12 bits hold it. Follows the
// original instrument; the synchronous enable in place of a clock is this design's.
module register_r
  import corr_pkg::*;
#(
  parameter int unsigned W_IN = AD_W,
  parameter int unsigned W    = R_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            f1_up,
  input  logic            a,
  input  logic            c,
  input  logic [W_IN-1:0] r_in,
  output logic [W-1:0]    r_q
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear)
      r_q <= '0;
    else if (f1_up)
      r_q <= a ? W'(r_in) : {r_q[W-2:0], c};
  end
endmodule
