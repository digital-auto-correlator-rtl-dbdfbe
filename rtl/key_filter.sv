// key_filter: push-button conditioning.
//
// The raw switch is synchronised with two flip-flops; a new level is taken
// only after it has been stable for DEB_CLKS clocks (10 ms at the assumed
// 10 MHz clock), which absorbs contact bounce. `level` is the filtered
// switch and `pulse` is one clock wide at each filtered press, however long
// the key is held. The original instrument does both with RC filters, NAND latches and
// an open-collector one-shot; the counter filter is this design's own.
module key_filter #(
  parameter int unsigned DEB_CLKS = 100_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic key_raw,
  output logic level,
  output logic pulse
);
  localparam int unsigned CW = $clog2(DEB_CLKS + 1);
  logic [1:0]    sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync  <= '0;
      cnt   <= '0;
      level <= 1'b0;
      pulse <= 1'b0;
    end else begin
      sync  <= {sync[0], key_raw};
      pulse <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (32'(cnt) >= DEB_CLKS - 1) begin
        cnt   <= '0;
        level <= sync[1];
        pulse <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
