// tb_rx_exception_handler: checks how the receiver reacts to a frame's outcome.
// An exception from any decoder must flush the frame once with the posted code, in the
// priority order FCD, AD, SCD, FBD, FCS, except that 1101 (retried frame) comes first and
// also raises REC_DATA so that the ACK is sent again. A frame for another station must be
// flushed with nav_load. A good frame must be committed and raise the REC_ pulse of its
// subtype. Only one reaction per frame.
`timescale 1ns/1ps
module tb_rx_exception_handler;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic fs = 0, fe = 0, good = 0, nfm = 0; logic [4:0] e = 0; logic [3:0] c [5];
  logic [3:0] sub = ST_DATA;
  logic flush, commit, navl, rerr, rts, cts, dat, ack; logic [3:0] rcode;
  rx_exception_handler dut (.clk, .rst_n, .frame_start(fs), .frame_end(fe), .frame_good(good),
    .fcd_err(e[0]), .fcd_code(c[0]), .adr_err(e[1]), .adr_code(c[1]), .scd_err(e[2]), .scd_code(c[2]),
    .fbd_err(e[3]), .fbd_code(c[3]), .fcs_err(e[4]), .fcs_code(c[4]), .not_for_me(nfm),
    .FCH_Subtype(sub), .flush, .commit, .nav_load(navl), .RX_ERR(rerr), .RX_ERRCODE(rcode),
    .REC_RTS(rts), .REC_CTS(cts), .REC_DATA(dat), .REC_ACK(ack));

  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int n_flush, n_commit, n_nav, n_rec [4];
  always @(posedge clk) if (rst_n) begin
    if (flush) n_flush++;
    if (commit) n_commit++;
    if (navl) n_nav++;
    if (rts) n_rec[3]++;
    if (cts) n_rec[2]++;
    if (dat) n_rec[1]++;
    if (ack) n_rec[0]++;
  end

  // one frame with the given error set; returns after the frame end
  task automatic frame(input logic [4:0] errs, input bit other, input logic [3:0] s);
    logic [3:0] exp;
    int rec_idx;
    n_flush = 0; n_commit = 0; n_nav = 0; for (int i = 0; i < 4; i++) n_rec[i] = 0;
    sub = s;
    fs = 1; @(negedge clk); fs = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 5; i++) c[i] = 4'(1 + $urandom % 15);
    if (errs[2] && $urandom % 3 == 0) c[2] = RX_RETRY_FRAME;
    e = errs; nfm = other;
    repeat (4) @(negedge clk);
    good = (errs == 0); fe = 1; @(negedge clk); fe = 0;
    repeat (3) @(negedge clk);
    exp = RX_OK;
    if (errs[2] && c[2] == RX_RETRY_FRAME) exp = RX_RETRY_FRAME;
    else for (int i = 4; i >= 0; i--) if (errs[i]) exp = c[i];
    rec_idx = (s == ST_RTS) ? 3 : (s == ST_CTS) ? 2 : (s == ST_DATA) ? 1 : 0;
    if (errs != 0) begin
      check(n_flush == 1 && n_commit == 0 && rerr && rcode == exp,
            $sformatf("errors %b: flush %0d code %b expected %b", errs, n_flush, rcode, exp));
      check(n_rec[1] == ((exp == RX_RETRY_FRAME) ? 1 : 0), "REC_DATA only for a retried frame");
    end else if (other) begin
      check(n_flush == 1 && n_nav == 1 && n_commit == 0, "frame for another station: flush and NAV");
    end else begin
      check(n_commit == 1 && n_flush == 0 && !rerr, "good frame committed");
      check(n_rec[rec_idx] == 1 && n_rec[0] + n_rec[1] + n_rec[2] + n_rec[3] == 1, "one REC_ pulse of its kind");
    end
    e = 0; nfm = 0; good = 0;
  endtask

  initial begin
    logic [3:0] subs [4] = '{ST_RTS, ST_CTS, ST_DATA, ST_ACK};
    for (int i = 0; i < 5; i++) c[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 4; i++) frame(0, 0, subs[i]);
    frame(5'b00001, 0, ST_DATA); frame(5'b10000, 0, ST_DATA); frame(5'b11110, 0, ST_DATA);
    frame(0, 1, ST_RTS);
    for (int i = 0; i < 200; i++)
      frame(($urandom % 2) ? 5'($urandom) : 5'd0, ($urandom % 4) == 0, subs[$urandom % 4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
