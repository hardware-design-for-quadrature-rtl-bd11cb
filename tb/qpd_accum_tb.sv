// Testbench for qpd_accum: random windows of random length (including
// one-sample windows), random gaps in the valid stream and random signed
// inputs. Checks the running sum after every input and the closed-window sum
// and its one-clock sum_valid pulse against a reference sum.
module qpd_accum_tb;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic signed [31:0] d = 0;
  logic signed [47:0] acc, sum;
  logic sum_valid;
  int checks = 0, failures = 0;

  qpd_accum #(.IN_W(32), .ACC_W(48)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_first(in_first), .in_last(in_last), .d(d), .acc(acc), .sum_valid(sum_valid), .sum(sum));

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
    longint ref_sum;
    int len, windows;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    windows = 0;
    for (int w = 0; w < 300; w++) begin
      len = (w % 7 == 0) ? 1 : 1 + int'($urandom % 300);
      ref_sum = 0;
      for (int i = 0; i < len; i++) begin
        // random idle cycles between samples
        while (($urandom % 5) == 0) begin
          @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
          @(posedge clk); #1;
          check(sum_valid == 0, "no sum_valid while idle");
        end
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_last = (i == len - 1);
        d = (w % 11 == 3) ? 32'sh8000_0000 : 32'($urandom);   // include the most negative
        ref_sum += longint'(d);
        @(posedge clk); #1;
        check(longint'(acc) == ref_sum, $sformatf("running sum w=%0d i=%0d", w, i));
        check(sum_valid == (i == len - 1), $sformatf("sum_valid w=%0d i=%0d", w, i));
        if (i == len - 1) begin
          check(longint'(sum) == ref_sum, $sformatf("window sum w=%0d: %0d vs %0d", w, sum, ref_sum));
          windows++;
        end
      end
      @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
      @(posedge clk); #1;
      check(sum_valid == 0, "sum_valid is a one-clock pulse");
    end
    check(windows == 300, "all windows closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
