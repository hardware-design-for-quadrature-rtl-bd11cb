// Testbench for cordic_atan: random vectors in all four quadrants, on the
// axes and at the extremes of the input range, issued with random gaps.
// Each result is compared with atan2/sqrt computed in floating point, and must
// appear exactly LATENCY = ITERS/2 + 1 = 10 clocks after its input, carrying
// its tag.
module cordic_atan_tb;
  localparam int unsigned IN_W  = 48;
  localparam int unsigned PH_W  = 16;
  localparam int unsigned TAG_W = 12;
  localparam int          LAT   = 10;
  localparam real         PI    = 3.14159265358979323846;
  localparam real         PH_LSB = 1.0 / 8192.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [IN_W-1:0] x = 0, y = 0;
  logic [TAG_W-1:0] in_tag = 0, out_tag;
  logic [IN_W-1:0] mag;
  logic signed [PH_W-1:0] phase;
  int checks = 0, failures = 0;

  cordic_atan #(.IN_W(IN_W), .ITERS(18), .PH_W(PH_W), .TAG_W(TAG_W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x), .y_in(y), .in_tag(in_tag),
    .out_valid(out_valid), .mag(mag), .phase(phase), .out_tag(out_tag));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by the cycle they must come out
  typedef struct { bit v; real ph; real mg; logic [TAG_W-1:0] tag; } exp_t;
  exp_t   pipe [LAT];
  int     issued = 0, seen = 0;

  function automatic longint rnd_mag(input int bits);
    longint r;
    r = {$urandom, $urandom};
    return r & ((64'd1 << bits) - 1);
  endfunction

  initial begin
    real    dph, emag, xr, yr;
    longint xv, yv;
    int     bits;
    foreach (pipe[i]) pipe[i].v = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 4000 + LAT; k++) begin
      @(negedge clk);
      if (k < 4000 && ($urandom % 4) != 0) begin
        bits = 20 + int'($urandom % (IN_W - 21));
        xv = rnd_mag(bits); yv = rnd_mag(bits);
        if ($urandom % 2) xv = -xv;
        if ($urandom % 2) yv = -yv;
        case (k % 97)
          0: begin xv = -(64'sd1 <<< (IN_W-1)); yv = 0; end
          1: begin xv = 0; yv = (64'sd1 <<< (IN_W-1)) - 1; end
          2: begin xv = (64'sd1 <<< (IN_W-1)) - 1; yv = -(64'sd1 <<< (IN_W-1)); end
          3: begin xv = -(64'sd1 <<< 30); yv = -1; end
          default: ;
        endcase
        in_valid = 1; x = IN_W'(xv); y = IN_W'(yv); in_tag = TAG_W'($urandom);
        issued++;
      end else begin
        in_valid = 0;
      end
      @(posedge clk);
      // shift the expectation pipeline, then add the new input
      for (int i = LAT - 1; i > 0; i--) pipe[i] = pipe[i-1];
      pipe[0].v = in_valid;
      if (in_valid) begin
        xr = real'(longint'(x)); yr = real'(longint'(y));
        pipe[0].ph  = $atan2(yr, xr);
        pipe[0].mg  = $sqrt(xr * xr + yr * yr);
        pipe[0].tag = in_tag;
      end
      #1;
      check(out_valid == pipe[LAT-1].v, $sformatf("out_valid at cycle %0d", k));
      if (out_valid && pipe[LAT-1].v) begin
        seen++;
        dph = real'(phase) * PH_LSB - pipe[LAT-1].ph;
        if (dph > PI)  dph -= 2.0 * PI;
        if (dph < -PI) dph += 2.0 * PI;
        check(dph < 1.5 * PH_LSB && dph > -1.5 * PH_LSB,
              $sformatf("phase %f expected %f", real'(phase) * PH_LSB, pipe[LAT-1].ph));
        emag = real'(mag) - pipe[LAT-1].mg;
        check(emag < 2e-4 * pipe[LAT-1].mg + 4.0 && emag > -2e-4 * pipe[LAT-1].mg - 4.0,
              $sformatf("magnitude %0d expected %f", mag, pipe[LAT-1].mg));
        check(out_tag == pipe[LAT-1].tag, "tag travels with its vector");
      end
    end
    check(seen == issued && issued > 2000, $sformatf("results %0d of %0d", seen, issued));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
