// sampling_pulse_gen: sampling pulses and the A/D convert pulse.
//
// Internal mode (ext_sel = 0): one sample_tick every `period` system clocks
// (period below 2 is treated as 2), free running from reset. External mode:
// the ext_in input is synchronised with two flip-flops and each rising edge
// gives one sample_tick. sample_tick is one clock wide; it is both the
// narrow convert pulse for the A/D converter and the shift strobe of the
// tau_m shift register, which, as in the original instrument, act at the leading edge
// of the sampling pulse. The original instrument uses a free-running NAND-gate
// multivibrator (1 kHz - 50 kHz) and a one-shot; a programmable divider of
// the system clock is this design's replacement.
module sampling_pulse_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] period,
  input  logic        ext_sel,
  input  logic        ext_in,
  output logic        sample_tick
);
  logic [15:0] cnt, last;
  logic [2:0]  ext_sync;
  logic        int_tick, ext_tick;

  assign last     = (period < 16'd2) ? 16'd1 : period - 16'd1;
  assign int_tick = (cnt >= last);
  assign ext_tick = ext_sync[1] & ~ext_sync[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      ext_sync <= '0;
    end else begin
      cnt      <= int_tick ? 16'd0 : cnt + 16'd1;
      ext_sync <= {ext_sync[1:0], ext_in};
    end
  end

  assign sample_tick = ext_sel ? ext_tick : int_tick;
endmodule
