// bcd_counter: ripple-carry chain of decimal counter decades.
//
// Each decade counts 0..9; a decade rolls over when it and all lower decades
// read 9 and inc is high, and its carry_o bit then pulses for that clock.
// carry_o[k] is therefore high exactly when the count passes a multiple of
// 10^(k+1). clear zeroes every decade synchronously and wins over inc.
// Helper shared by the C0 counter and the display counter.
module bcd_counter #(
  parameter int unsigned DIGITS = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     inc,
  output logic [DIGITS-1:0][3:0]   q,
  output logic [DIGITS-1:0]        carry_o
);
  logic [DIGITS:0] en;

  assign en[0] = inc;
  for (genvar k = 0; k < DIGITS; k++) begin : g_decade
    assign carry_o[k] = en[k] && (q[k] == 4'd9);
    assign en[k+1]    = carry_o[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      q <= '0;
    end else begin
      for (int k = 0; k < DIGITS; k++)
        if (en[k]) q[k] <= (q[k] == 4'd9) ? 4'd0 : q[k] + 4'd1;
    end
  end
endmodule
