// Testbench for dds: checks the phase step, the sine and cosine samples
// against an independently computed sin/cos of the reported phase, exact
// quadrature, and the output frequency (zero crossings over several periods).
module dds_tb;
  localparam int unsigned PHASE_W = 32;
  localparam int unsigned LUT_AW  = 10;
  localparam int unsigned OUT_W   = 16;
  localparam longint unsigned INC = 2147484;  // round(50e3/100e6 * 2^32)
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic [PHASE_W-1:0] phase;
  logic signed [OUT_W-1:0] s, c;
  int checks = 0, failures = 0;

  dds #(.PHASE_W(PHASE_W), .LUT_AW(LUT_AW), .OUT_W(OUT_W)) dut (
    .clk(clk), .rst_n(rst_n), .phase_out(phase), .sine(s), .cosine(c));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PHASE_W-1:0] prev;
    real ang, es, ec;
    int  zc, n;
    logic signed [OUT_W-1:0] sprev;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    check(phase == 0, "phase starts at 0 after reset");
    prev = phase; sprev = s; zc = 0;
    n = 10000;                         // five 50 kHz periods at 100 MHz
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      check(phase == PHASE_W'(prev + INC), $sformatf("phase step at %0d", k));
      // expected sample: table point centred on the truncated phase
      ang = 2.0 * PI * (real'(phase >> (PHASE_W - LUT_AW)) + 0.5) / real'(2 ** LUT_AW);
      es  = 32767.0 * $sin(ang);
      ec  = 32767.0 * $cos(ang);
      check((real'(s) - es) < 0.51 && (es - real'(s)) < 0.51,
            $sformatf("sine %0d vs %f at phase %h", s, es, phase));
      check((real'(c) - ec) < 0.51 && (ec - real'(c)) < 0.51,
            $sformatf("cosine %0d vs %f at phase %h", c, ec, phase));
      if (sprev < 0 && s >= 0) zc++;
      sprev = s;
      prev  = phase;
    end
    check(zc == 5, $sformatf("rising zero crossings %0d, expected 5", zc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
