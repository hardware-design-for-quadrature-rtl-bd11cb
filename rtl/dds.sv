// Direct digital synthesizer: synchronous sine and cosine references.
//
// A PHASE_W-bit phase accumulator advances by PHASE_INC every clock, so the
// output frequency is F_CLK_HZ * PHASE_INC / 2^PHASE_W (50 kHz at 100 MHz by
// default). The top LUT_AW bits of the phase address one full cycle of
// 2^LUT_AW points; only a quarter wave is stored and the other three quarters
// come from mirroring and negation. Cosine is read from the same table a
// quarter cycle ahead, so the two outputs are exactly in quadrature. The table
// holds round(AMP * sin(2*pi*(k + 0.5) / 2^LUT_AW)) for k in the first
// quarter, the half-point offset making the mirrored quarters exact.
//
// The sine output drives the excitation and, together with the cosine, serves
// as the demodulation reference. Using one generator for both is what the
// design relies on to avoid any frequency mismatch between drive and
// reference. The phase accumulator, table size and output rounding are this
// implementation's choices; only the sine/cosine function and the 50 kHz,
// 16-bit operating point come from the design description.
//
// Timing: phase_out, sine and cosine are registered together; sine/cosine
// correspond to phase_out in the same cycle. After reset phase_out is 0 and
// it advances by PHASE_INC every cycle.
module dds #(
  parameter int unsigned PHASE_W  = 32,
  parameter int unsigned LUT_AW   = 10,
  parameter int unsigned OUT_W    = 16,
  parameter longint unsigned F_CLK_HZ = 100_000_000,
  parameter longint unsigned F_OP_HZ  = 50_000,
  parameter longint unsigned PHASE_INC =
      ((F_OP_HZ << PHASE_W) + F_CLK_HZ / 2) / F_CLK_HZ
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic [PHASE_W-1:0]       phase_out,
  output logic signed [OUT_W-1:0]  sine,
  output logic signed [OUT_W-1:0]  cosine
);

  localparam int unsigned QN  = 2 ** (LUT_AW - 2);   // quarter-wave points
  localparam int unsigned QAW = LUT_AW - 2;
  localparam real         AMP = real'((2 ** (OUT_W - 1)) - 1);
  localparam real         PI  = 3.14159265358979323846;

  typedef logic [OUT_W-2:0] qtab_t [QN];

  function automatic qtab_t mk_qtab();
    qtab_t t;
    for (int k = 0; k < int'(QN); k++)
      t[k] = (OUT_W-1)'(longint'($floor(AMP * $sin(2.0 * PI * (real'(k) + 0.5)
                                                   / real'(4 * QN)) + 0.5)));
    return t;
  endfunction

  localparam qtab_t QTAB = mk_qtab();

  logic [PHASE_W-1:0] phase_acc;

  // Signed sample of the full wave at table index idx.
  function automatic logic signed [OUT_W-1:0] wave(input logic [LUT_AW-1:0] idx);
    logic [1:0]       quad;
    logic [QAW-1:0]   off;
    logic [OUT_W-2:0] mag;
    quad = idx[LUT_AW-1 -: 2];
    off  = idx[QAW-1:0];
    mag  = quad[0] ? QTAB[~off] : QTAB[off];
    return quad[1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

  logic [LUT_AW-1:0] idx_s, idx_c;
  always_comb begin
    idx_s = phase_acc[PHASE_W-1 -: LUT_AW];
    idx_c = idx_s + LUT_AW'(QN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_acc <= '0;
      phase_out <= '0;
      sine      <= '0;
      cosine    <= '0;
    end else begin
      phase_acc <= phase_acc + PHASE_W'(PHASE_INC);
      phase_out <= phase_acc;
      sine      <= wave(idx_s);
      cosine    <= wave(idx_c);
    end
  end

endmodule
