// Signed multiplier of one input sample by one reference value.
//
// Forms the full-precision product a*b and registers it, so the result and
// its valid flag appear one clock after the operands (the single z^-1 stage
// of the multiplier in the design's block diagram). Two of these form the
// in-phase and quadrature mixers. The product keeps all A_W+B_W bits; no
// rounding or saturation is applied. Operand widths default to the 16-bit
// configuration; the register-on-output arrangement and the valid flag are
// this implementation's choice.
module qpd_mult #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16,
  parameter int unsigned P_W = A_W + B_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [A_W-1:0]  a,
  input  logic signed [B_W-1:0]  b,
  output logic                   out_valid,
  output logic signed [P_W-1:0]  p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= P_W'(a * b);
    end
  end

endmodule
