// Testbench for demod_ctrl (7-sample windows, 5 electrodes = 10 pairs):
// drives a gappy sample stream while toggling `run`, and checks every output
// against a reference built from the list of all electrode pairs. Checks that
// an open window always completes after run drops, that nothing is taken
// while stopped between windows, and that frames wrap to pair (0,1).
module demod_ctrl_tb;
  localparam int unsigned NS = 7;
  localparam int unsigned NCH = 5;
  localparam int unsigned NP = NCH * (NCH - 1) / 2;

  logic clk = 0, rst_n = 0;
  logic run = 0, smp_valid = 0;
  logic take, first, last, frame_end, busy;
  logic [3:0] pair;
  logic [2:0] tx, rx;
  int checks = 0, failures = 0;

  demod_ctrl #(.N_SAMPLES(NS), .N_CH(NCH)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .smp_valid(smp_valid), .take(take),
    .first(first), .last(last), .frame_end(frame_end), .pair(pair), .tx(tx), .rx(rx),
    .busy(busy));

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

  int ptx [NP], prx [NP];

  initial begin
    int p, idx, frames, stops_mid;
    bit open, exp_take;
    p = 0;
    for (int a = 0; a < int'(NCH); a++)
      for (int b = a + 1; b < int'(NCH); b++) begin ptx[p] = a; prx[p] = b; p++; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    p = 0; idx = 0; open = 0; frames = 0; stops_mid = 0;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      if ((k / 300) % 3 == 2) run = ($urandom % 8) == 0;  // mostly stopped
      else                    run = ($urandom % 16) != 0; // mostly running
      smp_valid = ($urandom % 3) != 0;
      #1;
      exp_take = smp_valid && (open || run);
      if (open && !run && smp_valid) stops_mid++;
      check(take == exp_take, $sformatf("take k=%0d", k));
      check(busy == open, "busy means a window is open");
      check(tx == 3'(ptx[p]) && rx == 3'(prx[p]) && pair == 4'(p),
            $sformatf("pair %0d (%0d,%0d) expected %0d (%0d,%0d)", pair, tx, rx, p, ptx[p], prx[p]));
      if (exp_take) begin
        check(first == (idx == 0), $sformatf("first at index %0d", idx));
        check(last == (idx == int'(NS) - 1), $sformatf("last at index %0d", idx));
        check(frame_end == (idx == int'(NS) - 1 && p == int'(NP) - 1), "frame_end");
        if (idx == int'(NS) - 1) begin
          idx = 0; open = 0;
          if (p == int'(NP) - 1) begin p = 0; frames++; end
          else p++;
        end else begin
          idx++; open = 1;
        end
      end else begin
        check(!first && !last && !frame_end, "flags only with a taken sample");
      end
    end
    check(frames >= 3, $sformatf("frames completed: %0d", frames));
    check(stops_mid > 0, "run dropped inside a window at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
