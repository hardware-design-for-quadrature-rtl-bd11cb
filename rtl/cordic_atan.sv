// Pipelined vectoring CORDIC: rectangular (x, y) to polar (magnitude, phase).
//
// Gives phase = atan2(y, x) over the full circle and magnitude sqrt(x^2+y^2),
// as needed to turn the two accumulator sums into the measured phase and
// amplitude. A first step folds vectors with x < 0 into the right half-plane
// by a +/-90 degree rotation, preloading the angle with +/-pi/2. Then ITERS
// shift-and-add micro-rotations drive y towards zero, adding +/-atan(2^-i) to
// the angle at each step. The x that remains is the magnitude times the CORDIC
// gain K = prod sqrt(1 + 2^-2i); the last stage multiplies it by round(2^16/K)
// to remove the gain, and rounds the angle to PH_W bits.
//
// Interface: signed IN_W-bit x and y with in_valid and an opaque in_tag that
// travels alongside. Outputs: unsigned magnitude of IN_W bits, phase in
// radians as signed PH_W bits with PH_W-3 fraction bits (range +/-pi), out_tag.
//
// Timing: fully pipelined, one vector per clock. Stage 1 does the quadrant
// fold and two micro-rotations, each further stage two more, and a final stage
// the gain correction, so LATENCY = ITERS/2 + 1 clocks: 10 for the default 18
// iterations, the latency shown for the CORDIC block in the design. The
// algorithm, iteration count, internal widths and output format are this
// implementation's choices.
module cordic_atan
  import qpd_pkg::*;
#(
  parameter int unsigned IN_W  = 48,
  parameter int unsigned ITERS = 18,
  parameter int unsigned PH_W  = 16,
  parameter int unsigned TAG_W = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic signed [IN_W-1:0]  y_in,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic [IN_W-1:0]         mag,
  output logic signed [PH_W-1:0]  phase,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int unsigned W       = IN_W + 2;      // growth: sqrt(2) * K < 4
  localparam int unsigned NSTG    = ITERS / 2;     // rotation stages
  localparam int unsigned KC_W    = 17;            // 1/K in Q0.16
  localparam int unsigned PH_FRAC = PH_W - 3;

  function automatic longint mk_inv_k();
    real k;
    k = 1.0;
    for (int i = 0; i < int'(ITERS); i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return longint'($floor((2.0 ** 16) / k + 0.5));
  endfunction

  localparam logic signed [KC_W-1:0] INV_K = KC_W'(mk_inv_k());

  typedef struct packed {
    logic                 v;
    logic signed [W-1:0]  x;
    logic signed [W-1:0]  y;
    angle_t               z;
    logic [TAG_W-1:0]     tag;
  } stage_t;

  // One vectoring micro-rotation by atan(2^-i).
  function automatic stage_t rotate(input stage_t s, input int unsigned i);
    stage_t r;
    r = s;
    if (s.y >= 0) begin
      r.x = s.x + (s.y >>> i);
      r.y = s.y - (s.x >>> i);
      r.z = s.z + ATAN_TAB[i];
    end else begin
      r.x = s.x - (s.y >>> i);
      r.y = s.y + (s.x >>> i);
      r.z = s.z - ATAN_TAB[i];
    end
    return r;
  endfunction

  // Quadrant fold of the input vector.
  stage_t s_in;
  always_comb begin
    logic signed [W-1:0] xe, ye;
    xe = W'(x_in);
    ye = W'(y_in);
    s_in.v   = in_valid;
    s_in.tag = in_tag;
    if (xe < 0) begin
      if (ye >= 0) begin
        s_in.x = ye;  s_in.y = -xe; s_in.z = HALF_PI;
      end else begin
        s_in.x = -ye; s_in.y = xe;  s_in.z = -HALF_PI;
      end
    end else begin
      s_in.x = xe;  s_in.y = ye;  s_in.z = '0;
    end
  end

  stage_t stg [NSTG];

  for (genvar g = 0; g < int'(NSTG); g++) begin : g_stage
    stage_t src;
    if (g == 0) begin : g_first
      always_comb src = s_in;
    end else begin : g_next
      always_comb src = stg[g-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stg[g] <= '0;
      else        stg[g] <= rotate(rotate(src, 2 * g), 2 * g + 1);
    end
  end

  // Gain correction and angle rounding.
  logic signed [W+KC_W-1:0] mag_scaled;
  angle_t                   z_rnd;
  always_comb begin
    mag_scaled = stg[NSTG-1].x * INV_K;
    z_rnd      = stg[NSTG-1].z + (angle_t'(1) <<< (Z_FRAC - PH_FRAC - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
      phase     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= stg[NSTG-1].v;
      out_tag   <= stg[NSTG-1].tag;
      mag       <= IN_W'(mag_scaled >>> 16);
      phase     <= PH_W'(z_rnd >>> (Z_FRAC - PH_FRAC));
    end
  end

  initial begin
    assert (ITERS % 2 == 0 && ITERS >= 2 && ITERS < ATAN_N)
      else $error("cordic_atan: ITERS must be even and below %0d", ATAN_N);
  end

endmodule
