// tb_backoff_generator: checks the contention window and the backoff time.
// For retry counts 0..7 the window must be min((CW_MIN+1)*2^n - 1, CW_MAX), n the larger of
// the two retry counters; the backoff must be a multiple of the slot time no larger than
// CW*SLOT_TIME; done follows start by one cycle. Over many draws at the top window the
// slot counts must spread over the window.
`timescale 1ns/1ps
module tb_backoff_generator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int CWMIN = 7, CWMAX = 255, SLOT = 20;
  logic start = 0, done; logic [3:0] ssrc = 0, slrc = 0; logic [9:0] cw; logic [19:0] bt;
  backoff_generator #(.CW_MIN(CWMIN), .CW_MAX(CWMAX), .SLOT_TIME(SLOT)) dut (
    .clk, .rst_n, .start, .SSRC(ssrc), .SLRC(slrc), .done, .cw, .backoff_time(bt));

  initial begin repeat (50000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int exp_cw, lo, hi, seen_max;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int n = 0; n < 8; n++) begin
      for (int k = 0; k < 2; k++) begin
        ssrc = k ? 4'(n) : 4'(n / 2); slrc = k ? 4'(n / 3) : 4'(n);
        exp_cw = (CWMIN + 1) * (1 << n) - 1; if (exp_cw > CWMAX) exp_cw = CWMAX;
        start = 1; @(negedge clk); start = 0;
        check(done, "done one cycle after start");
        check(32'(cw) == exp_cw, $sformatf("n=%0d cw %0d expected %0d", n, cw, exp_cw));
        check(32'(bt) % SLOT == 0 && 32'(bt) <= exp_cw * SLOT, $sformatf("backoff %0d within window", bt));
        @(negedge clk); check(!done, "done is a pulse");
      end
    end
    ssrc = 7; slrc = 0; lo = 0; hi = 0; seen_max = 0;
    for (int i = 0; i < 400; i++) begin
      start = 1; @(negedge clk); start = 0;
      if (bt / SLOT < 64) lo++; else if (bt / SLOT >= 192) hi++;
      if (32'(bt) > seen_max) seen_max = 32'(bt);
      repeat ($urandom % 5) @(negedge clk);
    end
    check(lo > 40 && hi > 40, $sformatf("draws spread over the window (%0d low, %0d high)", lo, hi));
    check(seen_max <= CWMAX * SLOT, "no draw beyond the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
