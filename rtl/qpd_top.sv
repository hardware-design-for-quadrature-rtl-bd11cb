// Quadrature phase detector for an ECVT data acquisition system.
//
// Measures the phase shift theta and amplitude A of the digitized sensor
// signal u = A*sin(wt + theta) relative to the excitation, which this block
// generates itself. A DDS produces sin(wt), sent out as the excitation, and
// cos(wt). The sample is multiplied by each, and each product stream is
// summed over one window of whole signal periods. The double-frequency terms
// cancel, leaving
//     R = sum u*sin = N*A/2*cos(theta),   I = sum u*cos = N*A/2*sin(theta).
// A vectoring CORDIC turns (R, I) into theta = atan2(I, R) and
// |(R, I)| = N*A/2. The sequencer gives each window to one electrode pair and
// walks through all N_CH*(N_CH-1)/2 pairs of a frame.
//
// Interface: smp/smp_valid is the ADC sample (signed SMP_W bits), taken when
// valid and while run is high or a window is open. exc_sine is the excitation
// sample for the DAC, exc_phase the DDS phase behind it. sel_tx/sel_rx name
// the pair being measured. acc_re/acc_im are the running sums of the open
// window. For each window: sum_valid with sum_re/sum_im (the
// two window sums, 2 clocks after the window's last sample), then res_valid
// with res_phase (radians, PH_W-3 fraction bits), res_mag (= N*A/2 in
// sample*reference units) and the pair it belongs to, 12 clocks after the
// last sample. Windows run back to back, so one result leaves every N_SAMPLES
// samples.
//
// The signal chain (DDS, two multipliers, two accumulators, CORDIC) and the
// 50 kHz / 100 MHz / 16-bit / 32-channel operating point follow the design;
// bit widths, latencies of the DDS and the pair sequencing are this
// implementation's choices. The analog front end and ADC are outside.
module qpd_top #(
  parameter int unsigned     SMP_W     = qpd_pkg::SMP_W,
  parameter int unsigned     REF_W     = qpd_pkg::REF_W,
  parameter int unsigned     PHASE_W   = 32,
  parameter int unsigned     LUT_AW    = 10,
  parameter longint unsigned F_CLK_HZ  = 100_000_000,
  parameter longint unsigned F_ADC_HZ  = F_CLK_HZ,
  parameter longint unsigned F_OP_HZ   = 50_000,
  parameter int unsigned     N_PERIOD  = 1,
  parameter int unsigned     N_SAMPLES = int'(N_PERIOD * F_ADC_HZ / F_OP_HZ),
  parameter int unsigned     N_CH      = 32,
  parameter int unsigned     ACC_W     = 48,
  parameter int unsigned     ITERS     = 18,
  parameter int unsigned     PH_W      = 16,
  parameter int unsigned     N_PAIRS   = N_CH * (N_CH - 1) / 2,
  parameter int unsigned     PAIR_W    = $clog2(N_PAIRS + 1),
  parameter int unsigned     CH_W      = $clog2(N_CH + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic                     smp_valid,
  input  logic signed [SMP_W-1:0]  smp,
  output logic signed [REF_W-1:0]  exc_sine,
  output logic [PHASE_W-1:0]       exc_phase,
  output logic [CH_W-1:0]          sel_tx,
  output logic [CH_W-1:0]          sel_rx,
  output logic                     busy,
  output logic signed [ACC_W-1:0]  acc_re,
  output logic signed [ACC_W-1:0]  acc_im,
  output logic                     sum_valid,
  output logic signed [ACC_W-1:0]  sum_re,
  output logic signed [ACC_W-1:0]  sum_im,
  output logic                     res_valid,
  output logic signed [PH_W-1:0]   res_phase,
  output logic [ACC_W-1:0]         res_mag,
  output logic [PAIR_W-1:0]        res_pair,
  output logic [CH_W-1:0]          res_tx,
  output logic [CH_W-1:0]          res_rx,
  output logic                     res_frame_end
);

  localparam int unsigned P_W = SMP_W + REF_W;

  typedef struct packed {
    logic              frame_end;
    logic [PAIR_W-1:0] pair;
    logic [CH_W-1:0]   tx;
    logic [CH_W-1:0]   rx;
  } win_tag_t;

  localparam int unsigned TAG_W = $bits(win_tag_t);

  // ---------------- reference generator ----------------
  logic signed [REF_W-1:0] ref_sin, ref_cos;

  dds #(
    .PHASE_W (PHASE_W),
    .LUT_AW  (LUT_AW),
    .OUT_W   (REF_W),
    .F_CLK_HZ(F_CLK_HZ),
    .F_OP_HZ (F_OP_HZ)
  ) u_dds (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase_out(exc_phase),
    .sine     (ref_sin),
    .cosine   (ref_cos)
  );

  always_comb exc_sine = ref_sin;

  // ---------------- sequencer ----------------
  logic     take, first, last;
  win_tag_t tag0;

  demod_ctrl #(
    .N_SAMPLES(N_SAMPLES),
    .N_CH     (N_CH),
    .N_PAIRS  (N_PAIRS),
    .PAIR_W   (PAIR_W),
    .CH_W     (CH_W)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .run      (run),
    .smp_valid(smp_valid),
    .take     (take),
    .first    (first),
    .last     (last),
    .frame_end(tag0.frame_end),
    .pair     (tag0.pair),
    .tx       (tag0.tx),
    .rx       (tag0.rx),
    .busy     (busy)
  );

  always_comb begin
    sel_tx = tag0.tx;
    sel_rx = tag0.rx;
  end

  // ---------------- mixers ----------------
  logic                  p_valid, p_valid_c;
  logic signed [P_W-1:0] p_sin, p_cos;

  qpd_mult #(.A_W(SMP_W), .B_W(REF_W)) u_mult_sin (
    .clk(clk), .rst_n(rst_n), .in_valid(take), .a(smp), .b(ref_sin),
    .out_valid(p_valid), .p(p_sin)
  );

  qpd_mult #(.A_W(SMP_W), .B_W(REF_W)) u_mult_cos (
    .clk(clk), .rst_n(rst_n), .in_valid(take), .a(smp), .b(ref_cos),
    .out_valid(p_valid_c), .p(p_cos)
  );

  // Window flags and tag follow the products through the multiplier stage.
  logic     p_first, p_last;
  win_tag_t tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_first <= 1'b0;
      p_last  <= 1'b0;
      tag1    <= '0;
    end else if (take) begin
      p_first <= first;
      p_last  <= last;
      tag1    <= tag0;
    end
  end

  // ---------------- accumulators ----------------
  logic                    sv_re, sv_im;

  qpd_accum #(.IN_W(P_W), .ACC_W(ACC_W)) u_acc_re (
    .clk(clk), .rst_n(rst_n), .in_valid(p_valid), .in_first(p_first),
    .in_last(p_last), .d(p_sin), .acc(acc_re), .sum_valid(sv_re), .sum(sum_re)
  );

  qpd_accum #(.IN_W(P_W), .ACC_W(ACC_W)) u_acc_im (
    .clk(clk), .rst_n(rst_n), .in_valid(p_valid_c), .in_first(p_first),
    .in_last(p_last), .d(p_cos), .acc(acc_im), .sum_valid(sv_im), .sum(sum_im)
  );

  win_tag_t tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                tag2 <= '0;
    else if (p_valid && p_last) tag2 <= tag1;
  end

  always_comb sum_valid = sv_re;

  // ---------------- rectangular to polar ----------------
  win_tag_t tag_out;

  cordic_atan #(
    .IN_W (ACC_W),
    .ITERS(ITERS),
    .PH_W (PH_W),
    .TAG_W(TAG_W)
  ) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sum_valid),
    .x_in     (sum_re),
    .y_in     (sum_im),
    .in_tag   (tag2),
    .out_valid(res_valid),
    .mag      (res_mag),
    .phase    (res_phase),
    .out_tag  (tag_out)
  );

  always_comb begin
    res_pair      = tag_out.pair;
    res_tx        = tag_out.tx;
    res_rx        = tag_out.rx;
    res_frame_end = tag_out.frame_end;
  end

  // The two branches are driven by the same flags and must stay in step.
  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (p_valid == p_valid_c) && (sv_re == sv_im));

endmodule
