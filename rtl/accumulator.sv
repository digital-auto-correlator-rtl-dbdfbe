// accumulator: 13-bit accumulator with a two-stage parallel adder.
//
// Adding register R into the accumulator takes two strobes, as in the
// original instrument's NAND-gate adder:
//   ADD.T (add_t): every bit A_N with R_N = 1 is complemented (A' = A xor R).
//   Ca.T  (ca_t):  every bit is complemented by its carry C_N, where
//                  C_1 = 0 and C_{N+1} = A'_N C_N + not(A'_N) R_N.
// The carry chain uses the half-added A' and R, which are both stable
// between the two strobes, so the pair performs one full addition. The
// carry out of the MSB, C_14, is a one-clock pulse on carry_o: it is the
// accumulator overflow, so counting it divides the total by 2^13 = 2*N^2.
// R is narrower than the accumulator; its missing upper bits are 0.
// clear (Key-clear) zeroes the accumulator. All of this follows the
// original instrument; the synchronous strobes are this design's timing.
module accumulator
  import corr_pkg::*;
#(
  parameter int unsigned AW = corr_pkg::ACC_W,
  parameter int unsigned RW = corr_pkg::R_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             add_t,
  input  logic             ca_t,
  input  logic [RW-1:0]   r_in,
  output logic [AW-1:0] acc_q,
  output logic             carry_o
);
  logic [AW-1:0] r_ext;
  logic [AW:0]   c;      // c[k] is the carry into bit k; c[AW] leaves the MSB

  assign r_ext = AW'(r_in);

  assign c[0] = 1'b0;
  for (genvar k = 0; k < AW; k++) begin : g_carry
    assign c[k+1] = (acc_q[k] & c[k]) | (~acc_q[k] & r_ext[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      acc_q   <= '0;
      carry_o <= 1'b0;
    end else begin
      carry_o <= 1'b0;
      if (add_t)
        acc_q <= acc_q ^ r_ext;
      else if (ca_t) begin
        acc_q   <= acc_q ^ c[AW-1:0];
        carry_o <= c[AW];
      end
    end
  end
endmodule
