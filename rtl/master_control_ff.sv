// master_control_ff: F_DO, the "process ON" flip-flop.
//
// Set by the Key-start pulse; reset by Key-clear, by Key-stop, or by the C0
// pulse when Key-run is 0 (with Key-run = 1 the measurement runs until
// Key-stop). Reset has priority over set. The set/reset equations follow the
// original instrument; the original instrument builds a cross-coupled NAND latch, here it is a
// synchronous flip-flop, and the priority is this design's choice.
// Timing: F_DO changes one clock after the pulse that sets or resets it.
module master_control_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic key_start,
  input  logic key_stop,
  input  logic key_clear,
  input  logic key_run,
  input  logic c0_pulse,
  output logic fdo
);
  logic reset_req;
  assign reset_req = key_clear | key_stop | (c0_pulse & ~key_run);

  always_ff @(posedge clk) begin
    if (!rst_n || reset_req)
      fdo <= 1'b0;
    else if (key_start)
      fdo <= 1'b1;
  end
endmodule
