// Testbench helper: runs one complete frame through a qpd_top built for one
// configuration (data width, clock frequency, electrode count). Pair p of the
// frame sees a sensor phase theta_p = -1 + 2p/(pairs-1) rad at 0.9 of full
// scale, so a frame sweeps the +/-57.3 degree detection range. Every result
// is checked against its theta within TOL rad. When the frame is done it
// raises `done` and reports its checks, failures, the mean absolute phase
// error (degrees) and the number of clocks the frame took.
module qpd_cfg_run #(
  parameter int unsigned     W        = 16,
  parameter longint unsigned F_CLK_HZ = 100_000_000,
  parameter int unsigned     N_CH     = 8,
  parameter real             TOL      = 1e-3
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output int     checks,
  output int     failures,
  output real    mae_deg,
  output longint frame_clocks
);
  localparam int unsigned NP = N_CH * (N_CH - 1) / 2;
  localparam int unsigned NS = int'(F_CLK_HZ / 50_000);
  localparam int unsigned CW = $clog2(N_CH + 1);
  localparam int unsigned PW = $clog2(NP + 1);
  localparam real PI = 3.14159265358979323846;
  localparam real FS = real'((2 ** (W - 1)) - 1);

  logic run = 0, smp_valid = 0;
  logic signed [W-1:0] smp = 0, exc_sine;
  logic [31:0] exc_phase;
  logic [CW-1:0] sel_tx, sel_rx, res_tx, res_rx;
  logic busy, sum_valid, res_valid, res_frame_end;
  logic signed [47:0] acc_re, acc_im, sum_re, sum_im;
  logic signed [15:0] res_phase;
  logic [47:0] res_mag;
  logic [PW-1:0] res_pair;

  qpd_top #(.SMP_W(W), .REF_W(W), .F_CLK_HZ(F_CLK_HZ), .N_CH(N_CH)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .smp_valid(smp_valid), .smp(smp),
    .exc_sine(exc_sine), .exc_phase(exc_phase), .sel_tx(sel_tx), .sel_rx(sel_rx),
    .busy(busy), .acc_re(acc_re), .acc_im(acc_im), .sum_valid(sum_valid),
    .sum_re(sum_re), .sum_im(sum_im), .res_valid(res_valid), .res_phase(res_phase),
    .res_mag(res_mag), .res_pair(res_pair), .res_tx(res_tx), .res_rx(res_rx),
    .res_frame_end(res_frame_end));

  function automatic real theta_of(input int p);
    return -1.0 + 2.0 * real'(p) / real'(NP - 1);
  endfunction

  int  n_res = 0;
  real sum_err = 0.0;
  longint cyc = 0, t_first = 0, t_last = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    done = 0; checks = 0; failures = 0; mae_deg = 0.0; frame_clocks = 0;
  end

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      real err;
      err = real'(res_phase) / 8192.0 - theta_of(n_res);
      checks++;
      if (!(err < TOL && err > -TOL) || int'(res_pair) != n_res) begin
        failures++;
        $display("FAIL W=%0d F=%0d N_CH=%0d: pair %0d phase error %f rad", W, F_CLK_HZ, N_CH, n_res, err);
      end
      sum_err += (err < 0.0) ? -err : err;
      n_res++;
      if (res_frame_end) begin
        mae_deg = sum_err / real'(n_res) * 180.0 / PI;
        checks++;
        if (n_res != int'(NP)) failures++;
        done = 1;
      end
    end
  end

  initial begin
    int p, idx;
    wait (rst_n);
    @(negedge clk);
    run = 1; p = 0; idx = 0;
    while (p < int'(NP)) begin
      smp_valid = 1;
      smp = W'(longint'($floor(0.9 * FS *
              $sin(2.0 * PI * real'(exc_phase) / 4294967296.0 + theta_of(p)) + 0.5)));
      if (p == 0 && idx == 0) t_first = cyc;
      if (idx == int'(NS) - 1) begin
        idx = 0; p++;
        if (p == int'(NP)) begin t_last = cyc; run = 0; end
      end else idx++;
      @(negedge clk);
    end
    smp_valid = 0;
    frame_clocks = t_last - t_first + 1;
  end
endmodule
