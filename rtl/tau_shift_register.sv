// tau_shift_register: the tau_m delay memory.
//
// A chain of STAGES words of W bits. On every sampling pulse (shift) the word
// held by the A/D converter, still the previous conversion's result, enters
// stage 1 and every stage passes its word on, so stage k holds the sample
// taken k sampling intervals before the one the A/D is converting now. It
// runs whenever power is on, independent of any measurement. The 18 x 6-bit
// size follows the original instrument. The power-on reset is this design's own: the
// original relies on the chain filling itself and never clears it.
// Timing: taps change one clock after a shift strobe.
module tau_shift_register #(
  parameter int unsigned STAGES = 18,
  parameter int unsigned W      = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      shift,
  input  logic [W-1:0]              din,
  output logic [STAGES-1:0][W-1:0]  taps   // taps[k] = stage k+1
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (shift) begin
      taps[0] <= din;
      for (int k = 1; k < STAGES; k++) taps[k] <= taps[k-1];
    end
  end
endmodule
