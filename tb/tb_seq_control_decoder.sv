// tb_seq_control_decoder: checks the sequence/fragment number rules between Data frames.
// A scripted stream of sequence-control words (sequence number 15:4, fragment 3:0) with their
// MoreFragments and Retry bits is presented; after each frame without error the frame is
// committed. Each frame must give the expected code: 0000 for the next MSDU or the next
// fragment, 1101 for a retried frame already received, 1100/0111 for duplicates without the
// Retry bit, 0110 for a fragment out of order, 0101 for a new MSDU starting at fragment > 0,
// 1000 for a sequence number that skips, 1011 for Retry on a new MSDU, 1111 for a 17th
// fragment, 0011 for a non-Data subtype. SCD_Counter must count the committed fragments.
`timescale 1ns/1ps
module tb_seq_control_decoder;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] w = 0; logic en = 0, ws = 0, clear = 0, commit = 0, mf = 0, rt = 0;
  logic [3:0] sub = ST_DATA; logic [47:0] snd = 48'h04FF_FFFF_F045;
  logic ff, err; logic [15:0] cnt; logic [11:0] sn; logic [3:0] fn, code;
  seq_control_decoder dut (.clk, .rst_n, .SHFTOUT_BUS(w), .Enable_SCD(en), .word_strobe(ws),
    .clear, .commit, .FCH_Subtype(sub), .MoreFrag_Bit(mf), .Retry_Bit(rt), .SenderAddr(snd),
    .SCD_FragFlag(ff), .SCD_Counter(cnt), .SCD_SeqNo(sn), .SCD_FragNo(fn), .SCD_ERR(err),
    .SCD_ERRCODE(code));

  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic fr(input int seq, input int frag, input bit more, input bit retry,
                    input logic [3:0] exp_code, input int exp_cnt);
    w = {12'(seq), 4'(frag)}; mf = more; rt = retry; en = 1; ws = 1;
    @(negedge clk); en = 0; ws = 0;
    check(code == exp_code && err == (exp_code != 0) && sn == 12'(seq) && fn == 4'(frag),
          $sformatf("seq %0d frag %0d more %0d retry %0d: code %b expected %b", seq, frag, more, retry, code, exp_code));
    if (!err) begin commit = 1; @(negedge clk); commit = 0; end
    clear = 1; @(negedge clk); clear = 0;
    check(32'(cnt) == exp_cnt, $sformatf("counter %0d expected %0d", cnt, exp_cnt));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    fr(5, 0, 0, 0, RX_OK, 0);            // first MSDU
    fr(6, 0, 0, 0, RX_OK, 0);            // next
    fr(6, 0, 0, 1, RX_RETRY_FRAME, 0);   // retried (ACK lost)
    fr(6, 0, 0, 0, RX_DUP_SEQ, 0);       // duplicate without retry
    fr(9, 0, 0, 0, RX_SEQ_SYNC, 0);      // skips 7, 8
    fr(7, 2, 0, 0, RX_FRAG_SYNC, 0);     // starts at fragment 2
    fr(7, 0, 0, 1, RX_RETRY_SYNC, 0);    // retry bit on a new MSDU
    fr(7, 0, 1, 0, RX_OK, 1);            // burst of fragments
    fr(7, 1, 1, 0, RX_OK, 2);
    fr(7, 1, 1, 1, RX_RETRY_FRAME, 2);
    fr(7, 1, 1, 0, RX_DUP_FRAME, 2);
    fr(7, 3, 1, 0, RX_ERR_FRAG, 2);      // fragment 2 missing
    for (int f = 2; f < 15; f++) fr(7, f, 1, 0, RX_OK, f + 1);
    fr(7, 15, 1, 0, RX_FRAG_OVF, 15);    // a 17th would follow
    fr(7, 15, 0, 0, RX_OK, 0);           // last fragment closes the burst
    fr(8, 0, 0, 0, RX_OK, 0);
    sub = ST_RTS; fr(9, 0, 0, 0, RX_TYPE_SUB, 0); sub = ST_DATA;
    snd = 48'h04FF_FFFF_F041;
    fr(100, 0, 0, 0, RX_OK, 0);          // new sender: no history
    snd = 48'h04FF_FFFF_F045;
    fr(9, 0, 0, 0, RX_OK, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
