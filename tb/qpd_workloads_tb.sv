// Workload testbench: the configurations of the design's specification
// table, each run for one full frame with a phase sweep over +/-1 rad.
//   16-bit data, 100 MHz clock,  8 / 16 electrodes (frame rate)
//    8-bit data, 100 MHz clock,  8 electrodes
//   16-bit data, 200 MHz clock,  8 electrodes (4000-sample windows)
//    8-bit data, 200 MHz clock,  8 electrodes
// (The 32-electrode, 16-bit, 100 MHz case is the full-size testbench.)
// Checks each result's phase, that each frame lasts 2000 (or 4000) clocks
// times the pair count, that the frame rate in data/s is at least the
// specification's 1785 (8 electrodes) and 416 (16 electrodes), and that
// the mean absolute error stays below the specification's value for that
// configuration. Prints each configuration's mean absolute error and rate.
module qpd_workloads_tb;
  localparam int NCFG = 5;
  localparam int          CW   [NCFG] = '{16, 16, 8, 16, 8};
  localparam longint      CF   [NCFG] = '{100_000_000, 100_000_000, 100_000_000, 200_000_000, 200_000_000};
  localparam int          CCH  [NCFG] = '{8, 16, 8, 8, 8};
  localparam real         CTOL [NCFG] = '{1e-3, 1e-3, 2e-2, 1e-3, 2e-2};
  localparam real         CMAE [NCFG] = '{0.5794, 0.5794, 0.8529, 3.9960, 3.6494};
  localparam real         CRATE[NCFG] = '{1785.0, 416.0, 1785.0, 1785.0, 1785.0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   done [NCFG];
  int     ck   [NCFG];
  int     fl   [NCFG];
  real    mae  [NCFG];
  longint fc   [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    qpd_cfg_run #(.W(CW[i]), .F_CLK_HZ(CF[i]), .N_CH(CCH[i]), .TOL(CTOL[i])) u_run (
      .clk(clk), .rst_n(rst_n), .done(done[i]), .checks(ck[i]), .failures(fl[i]),
      .mae_deg(mae[i]), .frame_clocks(fc[i]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    real rate;
    longint exp_clk;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= done[i];
    end while (!all);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      checks += ck[i]; failures += fl[i];
      exp_clk = longint'(CF[i] / 50_000) * longint'(CCH[i] * (CCH[i] - 1) / 2);
      rate = real'(CF[i]) / real'(fc[i]);
      $display("config %0d-bit %0d MHz %0d electrodes: MAE %f deg (spec %f), %0d clocks/frame, %f data/s",
               CW[i], CF[i] / 1_000_000, CCH[i], mae[i], CMAE[i], fc[i], rate);
      checks += 3;
      if (fc[i] != exp_clk) begin failures++; $display("FAIL frame clocks %0d expected %0d", fc[i], exp_clk); end
      if (mae[i] >= CMAE[i]) begin failures++; $display("FAIL MAE above specification"); end
      if (CF[i] == 100_000_000 && rate < CRATE[i]) begin failures++; $display("FAIL rate below specification"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
