// tb_tx_control: checks the transaction sequences of the transmit control block.
// Models of the frame builder, medium access and frame transmitter answer its requests
// (FRAME_DONE, ACCESS_GRANTED, TRANSMIT_COMPLETE after random delays). Checked: an MSDU gives
// RTS, then after REC_CTS the Data fragments 0..N, each after REC_ACK, and msdu_done after the
// ACK of the last; a missing response gives EN_RETRY, timeout_evt and a rebuild of the same
// frame with Retry set and no new ENABLE_MEDIUM; REC_RTS gives a CTS and REC_DATA an ACK;
// the response timer does not run while the medium is busy.
`timescale 1ns/1ps
module tb_tx_control;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int TO = 200;
  logic msdurdy = 0, rdata = 0, rcts = 0, rrts = 0, rack = 0, fd = 0, lastf = 0, ag = 0, tc = 0;
  logic abort = 0, mbusy = 0; logic [23:0] bptr = 24'h000400;
  logic xmit, crce, enb, retry, enr, enm, txa, toe, mdone; logic [3:0] sub, fno; logic [23:0] bp;
  tx_control #(.RESP_TIMEOUT(TO)) dut (.clk, .rst_n, .MSDURDY(msdurdy), .BUF_PTR(bptr),
    .REC_DATA(rdata), .REC_CTS(rcts), .REC_RTS(rrts), .REC_ACK(rack), .FRAME_DONE(fd),
    .LAST_FRAG(lastf), .ACCESS_GRANTED(ag), .TRANSMIT_COMPLETE(tc), .abort, .medium_busy(mbusy),
    .TRANSMIT(xmit), .CRC_enable(crce), .EN_BUILDFRAME(enb), .FRAMESUBTYPE(sub), .RETRY(retry),
    .FRAG_NO(fno), .EN_RETRY(enr), .ENABLE_MEDIUM(enm), .BUFF_PTR(bp), .tx_active(txa),
    .timeout_evt(toe), .msdu_done(mdone));

  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int nfrags = 4;
  // environment models
  always @(posedge clk) if (rst_n) begin
    if (enb) fork begin repeat (1 + $urandom % 4) @(negedge clk); lastf = (sub != ST_DATA) || (32'(fno) == nfrags - 1);
                        fd = 1; @(negedge clk); fd = 0; end join_none
    if (enm || enr) fork begin repeat (5 + $urandom % 20) @(negedge clk); ag = 1; @(negedge clk); ag = 0; end join_none
    if (xmit) fork begin repeat (20 + $urandom % 20) @(negedge clk); tc = 1; @(negedge clk); tc = 0; end join_none
  end

  // log of sent frames: {subtype, fragment, retry}
  typedef struct { logic [3:0] s; logic [3:0] f; logic r; } fr_t;
  fr_t sent [$];
  int n_enm = 0, n_enr = 0, n_to = 0, n_done = 0, n_tc_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (xmit) sent.push_back('{sub, fno, retry});
    if (enm) n_enm++;
    if (enr) n_enr++;
    if (toe) n_to++;
    if (mdone) n_done++;
  end

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  // wait for the next transmission end, give it the response `resp` (0 = none)
  task automatic after_tc(input int which);
    int t;
    t = 0;
    while (!tc && t < 5000) begin @(negedge clk); t++; end
    repeat (3 + $urandom % 5) @(negedge clk);
    unique case (which)
      1: pulse(rcts);
      2: pulse(rack);
      3: pulse(rdata);
      default: ;
    endcase
  endtask

  initial begin
    int t;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // MSDU with 4 fragments, the ACK of fragment 1 missing, medium busy during the wait
    nfrags = 4;
    pulse(msdurdy);
    after_tc(1);                 // RTS -> CTS
    after_tc(2);                 // fragment 0 -> ACK
    after_tc(0);                 // fragment 1 -> no ACK
    mbusy = 1; repeat (TO + 50) @(negedge clk); mbusy = 0;
    check(n_to == 0, "timer held while the medium is busy");
    t = 0; while (n_enr == 0 && t < 2 * TO) begin @(negedge clk); t++; end
    check(n_enr == 1 && n_to == 1 && t <= TO + 5, $sformatf("timeout after %0d idle cycles", t));
    after_tc(2);                 // retried fragment 1 -> ACK
    after_tc(2);                 // fragment 2
    after_tc(2);                 // fragment 3
    repeat (5) @(negedge clk);
    check(n_done == 1, "msdu_done after the last ACK");
    check(bp == bptr, "buffer pointer captured");
    check(sent.size() == 6, $sformatf("%0d frames sent", sent.size()));
    if (sent.size() == 6) begin
      check(sent[0].s == ST_RTS, "RTS first");
      check(sent[1].s == ST_DATA && sent[1].f == 0 && !sent[1].r, "fragment 0");
      check(sent[2].f == 1 && !sent[2].r && sent[3].f == 1 && sent[3].r, "fragment 1 retried with Retry");
      check(sent[4].f == 2 && sent[5].f == 3 && !sent[5].r, "fragments 2 and 3");
    end
    check(n_enm == 5, $sformatf("ENABLE_MEDIUM for each new frame only (%0d)", n_enm));
    // RTS from a peer -> CTS, then Data -> ACK
    sent.delete();
    pulse(rrts);
    after_tc(3);
    t = 0; while (!tc && t < 5000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    check(sent.size() == 2 && sent[0].s == ST_CTS && sent[1].s == ST_ACK, "CTS then ACK");
    // Data without RTS -> ACK
    sent.delete();
    pulse(rdata);
    t = 0; while (!tc && t < 5000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    check(sent.size() == 1 && sent[0].s == ST_ACK, "ACK for a Data frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
