// register_s: register S, the multiplier sample s.
//
// W sample bits plus one dummy bit below the LSB. On each leading edge of
// the control-counter bit F1 (strobe f1_up) the register either loads the A/D
// output into its upper W bits with the dummy bit cleared (control pulse A=1)
// or shifts one place toward the LSB, filling with 0 (A=0). The dummy bit
// makes the first shift, which coincides with forming 2r+1 in register R,
// bring the sample's weight-1 bit to the LSB. Only the LSB (s_lsb) is used
// by the computation: it gates each conditional addition of register R.
// The load/shift rule and the dummy bit follow the original instrument; a single
// synchronous clock with an enable replaces F1 used as a clock.
module register_s
  import corr_pkg::*;
#(
  parameter int unsigned W = AD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         f1_up,
  input  logic         a,
  input  logic [W-1:0] ad_in,
  output logic [W:0]   s_q,
  output logic         s_lsb
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear)
      s_q <= '0;
    else if (f1_up)
      s_q <= a ? {ad_in, 1'b0} : {1'b0, s_q[W:1]};
  end

  assign s_lsb = s_q[0];
endmodule
