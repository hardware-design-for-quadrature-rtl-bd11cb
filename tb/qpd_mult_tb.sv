// Testbench for qpd_mult: random signed operands including the extremes,
// checks the product and that it appears exactly one clock later, and that
// the output holds when no valid operand arrives.
module qpd_mult_tb;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [15:0] a = 0, b = 0;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  qpd_mult #(.A_W(16), .B_W(16)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a(a), .b(b), .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_p, last_p;
    bit     exp_v;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    last_p = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      case (k % 50)
        0: begin a = -16'sd32768; b = -16'sd32768; end
        1: begin a = 16'sd32767;  b = -16'sd32768; end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      exp_v = in_valid;
      exp_p = exp_v ? longint'(a) * longint'(b) : last_p;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_v || longint'(p) != exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d a=%0d b=%0d p=%0d exp=%0d v=%b", k, a, b, p, exp_p, out_valid);
      end
      last_p = exp_p;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
