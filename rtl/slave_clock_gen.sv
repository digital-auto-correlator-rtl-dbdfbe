// slave_clock_gen: the slave clock, gated by F_T.
//
// While F_T = 1 it produces one cp strobe every CP_DIV system clocks, the
// first one acted on at the CP_DIV-th clock edge after F_T rises. While
// F_T = 0 it is silent and its divider is held at zero, so every
// computation starts with the same phase.
// The original instrument uses a bought clock module started by F_T at 1 MHz; with the
// assumed 10 MHz system clock, CP_DIV = 10 gives that rate.
module slave_clock_gen #(
  parameter int unsigned CP_DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ft,
  output logic cp
);
  localparam int unsigned DW = (CP_DIV > 1) ? $clog2(CP_DIV) : 1;
  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (!rst_n || !ft)
      div <= '0;
    else
      div <= (32'(div) == CP_DIV - 1) ? '0 : div + 1'b1;
  end

  assign cp = ft && (32'(div) == CP_DIV - 1);
endmodule
