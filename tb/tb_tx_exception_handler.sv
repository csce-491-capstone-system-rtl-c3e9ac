// tb_tx_exception_handler: checks the transmitter's error register and abort pulse.
// A medium-access error or a build error must post its code and pulse abort for one cycle;
// a medium error wins over a build error in the same cycle; a timeout posts 0100 without
// abort, an allocation timeout 0011 without abort; clear (a new MSDU) returns the code to 0000.
`timescale 1ns/1ps
module tb_tx_exception_handler;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clear = 0, ma = 0, bf = 0, to = 0, ato = 0, abort, err; logic [3:0] mac = 0, bfc = 0, code;
  tx_exception_handler dut (.clk, .rst_n, .clear, .ma_err(ma), .ma_code(mac), .bf_err(bf),
    .bf_code(bfc), .timeout_evt(to), .alloc_timeout(ato), .abort, .TX_ERR(err), .TX_ERRCODE(code));

  initial begin repeat (2000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(!err && code == TX_OK && !abort, "idle after reset");
    ma = 1; mac = TX_FRAME_RETRY; @(negedge clk); ma = 0;
    check(abort && err && code == TX_FRAME_RETRY, "medium error posts and aborts");
    @(negedge clk); check(!abort && code == TX_FRAME_RETRY, "abort is a pulse, code held");
    clear = 1; @(negedge clk); clear = 0; check(!err && code == TX_OK, "clear");
    bf = 1; bfc = TX_INVALID_ADDR; @(negedge clk); bf = 0;
    check(abort && code == TX_INVALID_ADDR, "build error posts and aborts");
    ma = 1; mac = TX_ALLOC_RETRY; bf = 1; bfc = TX_UNKNOWN_ADDR; @(negedge clk); ma = 0; bf = 0;
    check(abort && code == TX_ALLOC_RETRY, "medium error has priority");
    clear = 1; @(negedge clk); clear = 0;
    to = 1; @(negedge clk); to = 0;
    check(!abort && err && code == TX_TIMEOUT, "timeout posts 0100 without abort");
    clear = 1; @(negedge clk); clear = 0;
    ato = 1; @(negedge clk); ato = 0;
    check(!abort && err && code == TX_ALLOC_TIMEOUT, "allocation timeout posts 0011 without abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
