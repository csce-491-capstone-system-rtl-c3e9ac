// tb_medium_access: checks the DCF medium allocation: DIFS deferral, backoff, retry counters.
// Idle medium: the grant must come DIFS cycles after ENABLE_ACCESS with no backoff. Busy
// medium: a backoff must be drawn and the grant must wait for DIFS plus the backoff of idle
// medium, and never come while the medium (carrier sense or NAV) is busy. Retries of a short
// frame must step SSRC and widen the window 15, 31, ... until the short limit gives error
// 0010; a long frame steps SLRC up to its limit. Eight busy periods during one allocation
// must give error 0001. A medium busy for longer than the allocation watchdog must give an
// alloc_timeout pulse (exception 0011), a new backoff, and still a grant once it is idle.
`timescale 1ns/1ps
module tb_medium_access;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int DIFS = 50, SLOT = 20;
  logic ea = 0, er = 0, cs = 0, txa = 0, abort = 0; logic [15:0] nav = 0; logic [11:0] len = 20;
  logic grant, err, bos, ato; logic [3:0] code, ssrc, slrc; logic [9:0] cw;
  medium_access #(.DIFS(DIFS), .SLOT_TIME(SLOT), .ALLOC_TIMEOUT(400)) dut (.clk, .rst_n, .ENABLE_ACCESS(ea),
    .ENABLE_RETRY(er), .NAV_REG(nav), .CARRIER_SENSE(cs), .DOT11RTS_THRESHOLD(12'd500),
    .FRAME_LEN(len), .tx_active(txa), .abort, .ACCESS_GRANTED(grant), .MA_ERR(err),
    .MA_ERRCODE(code), .SSRC(ssrc), .SLRC(slrc), .backoff_started(bos),
    .alloc_timeout(ato), .CW(cw));

  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int n_ato = 0, n_bo = 0, bad_grant = 0, idle_run = 0, last_idle_run = 0;
  always @(posedge clk) if (rst_n) begin
    if (bos) n_bo++;
    if (ato) n_ato++;
    if (grant) begin last_idle_run = idle_run; if (cs || nav != 0) bad_grant++; end
    idle_run = (cs || nav != 0) ? 0 : idle_run + 1;
  end

  task automatic wait_grant(output int cyc, output bit errd);
    cyc = 0; errd = 0;
    while (!grant && !err && cyc < 20000) begin @(negedge clk); cyc++; end
    errd = err;
    @(negedge clk);
  endtask

  initial begin
    int c, b0; bit e;
    repeat (2) @(negedge clk); rst_n = 1; repeat (2) @(negedge clk);
    // idle medium
    b0 = n_bo;
    ea = 1; @(negedge clk); ea = 0; wait_grant(c, e);
    check(!e && c >= DIFS - 1 && c <= DIFS + 2, $sformatf("idle medium: grant after %0d cycles", c));
    check(n_bo == b0, "no backoff on an idle medium");
    // busy medium then NAV
    cs = 1; ea = 1; @(negedge clk); ea = 0;
    repeat (30) @(negedge clk); cs = 0; nav = 16'd40;
    repeat (40) @(negedge clk); nav = 0;
    wait_grant(c, e);
    check(!e && n_bo == b0 + 1, "busy medium: one backoff drawn");
    check(last_idle_run >= DIFS, $sformatf("grant after %0d idle cycles", last_idle_run));
    // allocation watchdog: medium busy for 1500 cycles
    b0 = n_bo;
    cs = 1; ea = 1; @(negedge clk); ea = 0;
    repeat (1500) @(negedge clk); cs = 0;
    wait_grant(c, e);
    check(!e && n_ato >= 1, $sformatf("allocation timeouts %0d, then granted", n_ato));
    check(n_bo >= b0 + 2, "a new backoff after each allocation timeout");
    // short-frame retries
    len = 20;
    ea = 1; @(negedge clk); ea = 0; wait_grant(c, e);
    for (int r = 1; r <= 7; r++) begin
      er = 1; @(negedge clk); er = 0;
      if (r < 7) begin
        repeat (3) @(negedge clk);
        check(ssrc == 4'(r) && slrc == 0, $sformatf("retry %0d: SSRC %0d", r, ssrc));
        check(32'(cw) == ((8 << r) - 1 > 255 ? 255 : (8 << r) - 1), $sformatf("retry %0d: CW %0d", r, cw));
        wait_grant(c, e); check(!e, "retry granted");
      end else begin
        check(err && code == TX_FRAME_RETRY, "short retry limit: error 0010");
      end
    end
    // long-frame retries
    len = 1000;
    ea = 1; @(negedge clk); ea = 0; wait_grant(c, e);
    check(ssrc == 0 && slrc == 0, "ENABLE_ACCESS clears the counters");
    for (int r = 1; r <= 4; r++) begin
      er = 1; @(negedge clk); er = 0;
      if (r < 4) begin wait_grant(c, e); check(!e && slrc == 4'(r) && ssrc == 0, $sformatf("long retry %0d", r)); end
      else check(err && code == TX_FRAME_RETRY, "long retry limit: error 0010");
    end
    // allocation retries: busy periods during deferral
    ea = 1; @(negedge clk); ea = 0;
    e = 0;
    for (int k = 0; k < 10 && !e; k++) begin
      repeat (10) @(negedge clk); cs = 1; @(negedge clk); if (err) e = 1; cs = 0;
      if (err) e = 1;
    end
    check(e && code == TX_ALLOC_RETRY, "allocation retry limit: error 0001");
    check(bad_grant == 0, "never granted on a busy medium");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
