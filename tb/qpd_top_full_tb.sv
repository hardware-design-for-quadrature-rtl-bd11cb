// Full-size testbench: qpd_top at its default parameters (16-bit data,
// 100 MHz clock, 50 kHz excitation, 2000-sample windows, 32 electrodes) runs
// one complete tomography frame of 32*31/2 = 496 pair measurements.
//
// The sensor model gives pair p the phase theta_p = -1 + 2p/495 rad (the
// +/-57.3 degree detection range) and amplitude 0.9 of full scale. Checks:
// every result's phase within 1e-3 rad and magnitude within 0.5 %, results in
// pair order, frame_end only on the last pair, and the frame taking exactly
// 2000*496 = 992000 clocks, i.e. 100.8 frames/s at 100 MHz. Prints the mean
// absolute phase error and the frame rate.
module qpd_top_full_tb;
  localparam int unsigned NCH = 32;
  localparam int unsigned NP  = NCH * (NCH - 1) / 2;
  localparam int unsigned NS  = 2000;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 0.9;

  logic clk = 0, rst_n = 0;
  logic run = 0, smp_valid = 0;
  logic signed [15:0] smp = 0;
  logic signed [15:0] exc_sine;
  logic [31:0] exc_phase;
  logic [5:0] sel_tx, sel_rx, res_tx, res_rx;
  logic busy, sum_valid, res_valid, res_frame_end;
  logic signed [47:0] acc_re, acc_im, sum_re, sum_im;
  logic signed [15:0] res_phase;
  logic [47:0] res_mag;
  logic [8:0] res_pair;
  int checks = 0, failures = 0;

  qpd_top dut (
    .clk(clk), .rst_n(rst_n), .run(run), .smp_valid(smp_valid), .smp(smp),
    .exc_sine(exc_sine), .exc_phase(exc_phase), .sel_tx(sel_tx), .sel_rx(sel_rx),
    .busy(busy), .acc_re(acc_re), .acc_im(acc_im), .sum_valid(sum_valid),
    .sum_re(sum_re), .sum_im(sum_im), .res_valid(res_valid), .res_phase(res_phase),
    .res_mag(res_mag), .res_pair(res_pair), .res_tx(res_tx), .res_rx(res_rx),
    .res_frame_end(res_frame_end));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (1100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real theta_of(input int p);
    return -1.0 + 2.0 * real'(p) / real'(NP - 1);
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int  n_res = 0, exp_tx = 0, exp_rx = 1;
  real sum_abs_err = 0.0, mg;
  longint t_first = -1, t_end = -1;

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      real err;
      err = real'(res_phase) / 8192.0 - theta_of(n_res);
      mg  = real'(NS) / 2.0 * AMP * 32767.0 * 32767.0;
      check(err < 1e-3 && err > -1e-3, $sformatf("pair %0d phase error %f rad", n_res, err));
      check(real'(res_mag) < mg * 1.005 && real'(res_mag) > mg * 0.995,
            $sformatf("pair %0d magnitude %0d", n_res, res_mag));
      check(int'(res_pair) == n_res && int'(res_tx) == exp_tx && int'(res_rx) == exp_rx,
            $sformatf("pair tag %0d (%0d,%0d)", res_pair, res_tx, res_rx));
      check(res_frame_end == (n_res == int'(NP) - 1), "frame_end on the last pair only");
      sum_abs_err += (err < 0.0) ? -err : err;
      n_res++;
      if (exp_rx == int'(NCH) - 1) begin exp_tx++; exp_rx = exp_tx + 1; end
      else exp_rx++;
    end
  end

  initial begin
    int p, idx;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run = 1;
    p = 0; idx = 0;
    while (p < int'(NP)) begin
      @(negedge clk);
      smp_valid = 1;
      smp = 16'(longint'($floor(AMP * 32767.0 *
              $sin(2.0 * PI * real'(exc_phase) / 4294967296.0 + theta_of(p)) + 0.5)));
      if (p == 0 && idx == 0) t_first = cyc;
      if (idx == int'(NS) - 1) begin
        idx = 0; p++;
        if (p == int'(NP)) begin t_end = cyc; run = 0; end
      end else idx++;
    end
    @(negedge clk) smp_valid = 0;
    repeat (20) @(posedge clk);
    #1;
    check(n_res == int'(NP), $sformatf("%0d of %0d results", n_res, NP));
    check(t_end - t_first + 1 == longint'(NS) * NP, $sformatf("frame took %0d clocks", t_end - t_first + 1));
    $display("frame: %0d clocks = %f frames/s at 100 MHz; mean absolute phase error %f deg",
             t_end - t_first + 1, 1.0e8 / real'(t_end - t_first + 1),
             sum_abs_err / real'(n_res) * 180.0 / PI);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
