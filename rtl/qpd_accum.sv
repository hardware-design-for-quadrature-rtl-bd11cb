// Windowed accumulator for one mixer branch.
//
// Sums the signed products of one measurement window. The window is framed
// by two flags that travel with the data: in_first restarts the sum from the
// incoming value (the accumulator's reset input in the block diagram), and
// in_last closes the window, copying the completed sum to `sum` and pulsing
// sum_valid for one clock. Summing whole signal periods cancels the
// double-frequency term of the mixer output and leaves N*A/2 times cos or sin
// of the phase. `acc` is the running sum, the ramp seen while a window is
// being integrated. A one-sample window (in_first and in_last together) is
// allowed. ACC_W must hold IN_W bits plus log2 of the window length; the
// default of 48 bits is this implementation's choice.
//
// Timing: a valid input updates acc on the next clock; when it carries
// in_last, sum and sum_valid update on that same clock edge.
module qpd_accum #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned ACC_W = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic signed [IN_W-1:0]   d,
  output logic signed [ACC_W-1:0]  acc,
  output logic                     sum_valid,
  output logic signed [ACC_W-1:0]  sum
);

  logic signed [ACC_W-1:0] acc_next;

  always_comb acc_next = (in_first ? '0 : acc) + ACC_W'(d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= acc_next;
        if (in_last) sum <= acc_next;
      end
    end
  end

endmodule
