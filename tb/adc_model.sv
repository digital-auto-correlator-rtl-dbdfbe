// adc_model: behavioural model of the 6-bit successive-approximation A/D
// converter (a bought part, not designed here), for the testbenches only.
// On a convert pulse it samples vin_mv (0..10000 mV full scale), and
// CONV_CLKS clocks later presents level = floor(vin * 64 / 10 V), clamped to
// 0..63, on `data` together with a one-clock `done` pulse. `data` keeps the
// previous result until then, as the converter's output register does. A
// convert pulse during a conversion restarts it. 60 clocks is 6 us at the
// 10 MHz system clock assumed for the design.
module adc_model #(
  parameter int unsigned CONV_CLKS = 60
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        convert,
  input  logic [15:0] vin_mv,
  output logic [5:0]  data,
  output logic        done
);
  int unsigned left;
  logic [5:0]  held;

  function automatic logic [5:0] quantise(input logic [15:0] mv);
    int unsigned l;
    l = (32'(mv) * 64) / 10000;
    return (l > 63) ? 6'd63 : 6'(l);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left <= 0;
      held <= '0;
      data <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (convert) begin
        left <= CONV_CLKS;
        held <= quantise(vin_mv);
      end else if (left == 1) begin
        left <= 0;
        data <= held;
        done <= 1'b1;
      end else if (left != 0) begin
        left <= left - 1;
      end
    end
  end
endmodule
