// End-to-end testbench for qpd_top with 4 electrodes (6 pairs per frame) and
// the default 2000-sample window (one 50 kHz period at 100 MHz).
//
// A sensor model answers the excitation: each sample is
// round(A * 32767 * sin(2*pi*exc_phase/2^32 + theta)), with theta and A set per
// window. Theta sweeps -1.0 .. +1.0 rad in 0.1 rad steps, then takes values
// beyond +/-90 degrees. Every result is checked for phase (against theta),
// magnitude (against N*A*32767^2/2), pair tag, and for leaving exactly 12
// clocks after its window's last sample. The mean absolute phase error is
// reported. Mechanisms counted, each required at least once: back-to-back
// windows, gaps in the sample stream, run dropped inside a window, idle time
// while stopped, a frame wrap, and a result needing the CORDIC quadrant fold.
module qpd_top_tb;
  localparam int unsigned NCH   = 4;
  localparam int unsigned NP    = NCH * (NCH - 1) / 2;
  localparam int unsigned NS    = 2000;
  localparam int          LAT   = 12;
  localparam real         PI    = 3.14159265358979323846;
  localparam real         PH_LSB = 1.0 / 8192.0;
  localparam int          NWIN  = 25;

  logic clk = 0, rst_n = 0;
  logic run = 0, smp_valid = 0;
  logic signed [15:0] smp = 0;
  logic signed [15:0] exc_sine;
  logic [31:0] exc_phase;
  logic [2:0] sel_tx, sel_rx, res_tx, res_rx;
  logic busy, sum_valid, res_valid, res_frame_end;
  logic signed [47:0] acc_re, acc_im, sum_re, sum_im;
  logic signed [15:0] res_phase;
  logic [47:0] res_mag;
  logic [3:0] res_pair;
  int checks = 0, failures = 0;

  qpd_top #(.N_CH(NCH)) dut (
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real theta [NWIN];
  real amp   [NWIN];
  int  ptx [NP], prx [NP];

  // expected result of each window
  typedef struct { longint due; real th; real mg; int pair; } exp_t;
  exp_t exq [$];

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_gap = 0, n_stop_mid = 0, n_idle = 0, n_wrap = 0, n_fold = 0, n_b2b = 0;
  int n_res = 0;
  real sum_abs_err = 0.0;

  // result checker
  always @(posedge clk) begin
    if (rst_n && res_valid) begin : chk
      exp_t e;
      real  ph, err;
      if (exq.size() == 0) begin
        check(0, "result without a window");
        disable chk;
      end
      e = exq.pop_front();
      ph = real'(res_phase) * PH_LSB;
      err = ph - e.th;
      check(cyc == e.due, $sformatf("result at cycle %0d, expected %0d", cyc, e.due));
      check(err < 0.001 && err > -0.001, $sformatf("phase %f rad, expected %f", ph, e.th));
      check(real'(res_mag) < e.mg * 1.005 && real'(res_mag) > e.mg * 0.995,
            $sformatf("magnitude %0d, expected %f", res_mag, e.mg));
      check(int'(res_pair) == e.pair && int'(res_tx) == ptx[e.pair] && int'(res_rx) == prx[e.pair],
            $sformatf("pair tag %0d (%0d,%0d), expected %0d", res_pair, res_tx, res_rx, e.pair));
      check(res_frame_end == (e.pair == int'(NP) - 1), "frame end flag");
      if (res_frame_end) n_wrap++;
      if (e.th > PI / 2 || e.th < -PI / 2) n_fold++;
      sum_abs_err += (err < 0.0) ? -err : err;
      n_res++;
    end
  end

  initial begin
    int  w, idx, p;
    bit  open, tk;
    longint last_end;
    p = 0;
    for (int a = 0; a < int'(NCH); a++)
      for (int b = a + 1; b < int'(NCH); b++) begin ptx[p] = a; prx[p] = b; p++; end
    for (int k = 0; k < NWIN; k++) begin
      theta[k] = (k <= 20) ? -1.0 + 0.1 * k : (k == 21 ? 2.5 : k == 22 ? -2.8 : k == 23 ? 3.0 : -1.9);
      amp[k]   = 0.5 + 0.02 * k;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run = 1;
    w = 0; idx = 0; p = 0; open = 0; last_end = -1;
    while (w < NWIN) begin
      @(negedge clk);
      // stream shaping: windows 5..7 get a sample every other clock (a
      // 50 MHz ADC, so the window spans two periods), window 9 loses run midway,
      // after window 12 the design sits stopped for a while
      smp_valid = !(w >= 5 && w <= 7 && cyc[0]);
      if (w == 9 && idx == 700) run = 0;
      if (w == 13 && idx == 0 && !open) begin
        if (n_idle < 300) begin run = 0; end else run = 1;
      end
      if (!smp_valid) n_gap++;
      tk = smp_valid && (open || run);
      if (smp_valid && !tk) n_idle++;
      if (tk && open && !run) n_stop_mid++;
      smp = 16'(longint'($floor(amp[w] * 32767.0 *
              $sin(2.0 * PI * real'(exc_phase) / 4294967296.0 + theta[w]) + 0.5)));
      if (tk) begin
        if (idx == 0) begin
          check(int'(sel_tx) == ptx[p] && int'(sel_rx) == prx[p], "electrode selection");
          if (last_end == cyc - 1) n_b2b++;
        end
        if (idx == int'(NS) - 1) begin
          exq.push_back('{due: cyc + LAT, th: theta[w],
                          mg: real'(NS) / 2.0 * amp[w] * 32767.0 * 32767.0, pair: p});
          last_end = cyc;
          idx = 0; open = 0; w++;
          p = (p == int'(NP) - 1) ? 0 : p + 1;
          if (w == 10) run = 1;
        end else begin
          idx++; open = 1;
        end
      end
    end
    @(negedge clk) smp_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    #1;
    check(exq.size() == 0, $sformatf("%0d results missing", exq.size()));
    check(n_res == NWIN, $sformatf("%0d results", n_res));
    $display("mechanisms: back-to-back=%0d gaps=%0d stop-mid-window=%0d idle=%0d frame-wrap=%0d fold=%0d",
             n_b2b, n_gap, n_stop_mid, n_idle, n_wrap, n_fold);
    check(n_b2b > 0, "back-to-back windows");
    check(n_gap > 0, "sample stream gaps");
    check(n_stop_mid > 0, "run dropped inside a window");
    check(n_idle > 0, "stopped between windows");
    check(n_wrap > 0, "frame wrap");
    check(n_fold > 0, "quadrant fold in CORDIC");
    check(sum_abs_err / real'(n_res) * 180.0 / PI < 0.58, "mean absolute error below 0.58 deg");
    $display("mean absolute phase error: %f deg over %0d windows",
             sum_abs_err / real'(n_res) * 180.0 / PI, n_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
