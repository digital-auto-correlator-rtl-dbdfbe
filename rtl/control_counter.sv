// control_counter: the 4-bit control counter F1,F2,F4,F8 and its decoding.
//
// While F_T = 1 the counter counts slave clock pulses (cp strobes) through
// the states T0..T14; while F_T = 0 it is held at T0. From the state it
// decodes, as in the original instrument:
//   A = T0+T1        = ~F2 ~F4 ~F8        (S and R load rather than shift)
//   B = T0+T1+T2     = ~F2 ~F4 ~F8 + ~F1 F2 ~F4 ~F8  (unconditional addition)
//   C = T2+T3        =  F2 ~F4 ~F8        (R shifts a 1 in: r -> 2r+1)
//   ADD.T = (B + S_lsb) F1,  Ca.T = (B + S_lsb) ~F1
// Each cp strobe is one edge of the slave clock. On it the accumulator
// stage decoded from the current state (ADD.T in odd states, Ca.T in even
// states from T2) is carried out, and, if F1 is about to rise, registers S
// and R load or shift. So one computation is 15 cp strobes: T0 -> T1 loads
// S and R; T1/T2 add r; T3/T4 .. T13/T14 add (2r+1)*2^p when bit p of s is 1;
// the strobe in T14 finishes the last carry stage and is the T14 pulse that
// clears F_T. The counter then returns to T0.
// Departures: the original instrument's counter is asynchronous (ripple) and clocked by
// the inverted slave clock; here it is one synchronous counter with an
// enable, which has none of the decoding spikes the original instrument analyses. The
// Ca.T strobe is suppressed in T0 because no slave clock pulse falls there
// in the original timing.
module control_counter
  import corr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ft,
  input  logic       cp,
  input  logic       s_lsb,
  output logic [3:0] cnt,
  output ctrl_t      ctrl
);
  logic f1, f2, f4, f8, gate, in_t0, in_t14;

  always_ff @(posedge clk) begin
    if (!rst_n || !ft)
      cnt <= 4'd0;
    else if (cp)
      cnt <= (cnt == 4'(N_CP)) ? 4'd0 : cnt + 4'd1;
  end

  assign {f8, f4, f2, f1} = cnt;
  assign in_t0  = (cnt == 4'd0);
  assign in_t14 = (cnt == 4'(N_CP));

  always_comb begin
    ctrl.a     = ~f2 & ~f4 & ~f8;
    ctrl.b     = (~f2 & ~f4 & ~f8) | (~f1 & f2 & ~f4 & ~f8);
    ctrl.c     = f2 & ~f4 & ~f8;
    gate       = ctrl.b | s_lsb;
    ctrl.f1_up = cp & ~f1 & ~in_t14;
    ctrl.add_t = cp & f1 & gate;
    ctrl.ca_t  = cp & ~f1 & ~in_t0 & gate;
    ctrl.t14   = cp & in_t14;
  end
endmodule
