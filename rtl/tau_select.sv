// tau_select: the tau_m select switch.
//
// A 20-position, six-section rotary switch: each section carries one bit
// (weights 32..1), position 1 takes the A/D output directly (delay 0),
// positions 2..19 take stages 1..18 of the tau_m shift register, and the
// wiper (position 20) feeds register R. Here the switch position is the
// binary number m = 0..18 and the switch is a multiplexer, purely
// combinational. Positions beyond 18 do not exist on the switch; this design
// returns 0 for them.
module tau_select #(
  parameter int unsigned STAGES = 18,
  parameter int unsigned W      = 6
) (
  input  logic [4:0]                m,
  input  logic [W-1:0]              direct,
  input  logic [STAGES-1:0][W-1:0]  taps,
  output logic [W-1:0]              r_out
);
  always_comb begin
    r_out = '0;
    if (m == 5'd0)
      r_out = direct;
    else if (32'(m) <= STAGES)
      r_out = taps[32'(m) - 1];
  end
endmodule
