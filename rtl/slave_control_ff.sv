// slave_control_ff: F_T, the "computation running" flip-flop.
//
// Set by an A/D done pulse while F_DO = 1; cleared by T14 at the end of the
// computation, or by Key-clear. While F_T = 1 the slave clock runs and the
// control counter steps. The original instrument's J-K flip-flop toggles on
// (F_DO . done) OR T14; a done pulse during a computation would toggle it off
// early. This design instead ignores a done pulse that arrives while F_T = 1
// (or together with T14) and reports it on sample_skipped, so that sample
// pair is simply not counted. Timing: F_T rises one clock after the done
// pulse and falls one clock after the T14 strobe.
module slave_control_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic key_clear,
  input  logic fdo,
  input  logic ad_done,
  input  logic t14,
  output logic ft,
  output logic sample_skipped
);
  assign sample_skipped = fdo & ad_done & ft;

  always_ff @(posedge clk) begin
    if (!rst_n || key_clear)
      ft <= 1'b0;
    else if (ft && t14)
      ft <= 1'b0;
    else if (!ft && fdo && ad_done)
      ft <= 1'b1;
  end
endmodule
