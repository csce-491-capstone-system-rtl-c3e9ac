// tb_frame_body_decoder: checks body storage and fragment reassembly.
// MSDUs are sent as Data frame bodies of random lengths, whole or in fragments; some
// fragments are abandoned (no commit, as after a CRC error) and sent again. After the last
// fragment msdu_ready must pulse with the total length in 16-bit words, and every 64-bit
// entry read back must hold the body words in order, first word in bits 63:48. A body that
// runs past 2 KB must raise FBD_ERR with code 1010.
`timescale 1ns/1ps
module tb_frame_body_decoder;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] w = 0; logic en = 0, ws = 0, fs = 0, commit = 0, clear = 0, mf = 0;
  logic [3:0] sub = ST_DATA, fn = 0; logic [7:0] ra = 0; logic [63:0] rd;
  logic ready, err; logic [8:0] ent; logic [10:0] words; logic [3:0] code;
  frame_body_decoder dut (.clk, .rst_n, .SHFTOUT_BUS(w), .Enable_FBD(en), .word_strobe(ws),
    .frame_start(fs), .commit, .clear, .FCH_Subtype(sub), .SCD_FragNo(fn), .MoreFrag_Bit(mf),
    .rd_addr(ra), .rd_data(rd), .msdu_ready(ready), .msdu_entries(ent), .msdu_words(words),
    .FBD_ERR(err), .FBD_ERRCODE(code));

  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int n_ready = 0;
  always @(posedge clk) if (ready) n_ready++;

  logic [15:0] msdu [$];

  task automatic body(input int f, input bit more, input int nwords, input bit do_commit);
    logic [15:0] v [$];
    fn = 4'(f); mf = more;
    fs = 1; @(negedge clk); fs = 0;
    for (int i = 0; i < nwords; i++) begin
      w = $urandom; v.push_back(w); en = 1; ws = 1; @(negedge clk); en = 0; ws = 0;
      if ($urandom % 2) @(negedge clk);
    end
    if (do_commit) begin
      commit = 1; @(negedge clk); commit = 0;
      foreach (v[i]) msdu.push_back(v[i]);
    end
    @(negedge clk);
  endtask

  task automatic check_msdu();
    int bad;
    logic [63:0] e;
    bad = 0;
    check(32'(words) == msdu.size(), $sformatf("length %0d words expected %0d", words, msdu.size()));
    check(32'(ent) == (msdu.size() + 3) / 4, "entry count");
    for (int k = 0; k < (msdu.size() + 3) / 4; k++) begin
      ra = 8'(k); @(negedge clk);
      e = 0;
      for (int j = 0; j < 4; j++) if (4*k + j < msdu.size()) e[63 - 16*j -: 16] = msdu[4*k + j];
      if (rd != e) bad++;
    end
    check(bad == 0, $sformatf("%0d entries differ", bad));
    msdu.delete();
  endtask

  initial begin
    int nf, r0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // whole MSDU of 2 KB
    r0 = n_ready; body(0, 0, 1024, 1); check(n_ready == r0 + 1, "ready after a whole MSDU"); check_msdu();
    // 16 fragments of 128 bytes with two abandoned attempts
    r0 = n_ready;
    for (int f = 0; f < 16; f++) begin
      if (f == 3 || f == 9) body(f, f != 15, 64, 0);
      body(f, f != 15, 64, 1);
      if (f < 15) check(n_ready == r0, "no ready before the last fragment");
    end
    check(n_ready == r0 + 1, "ready after the last fragment"); check_msdu();
    // random fragment counts and odd lengths
    for (int m = 0; m < 8; m++) begin
      nf = 1 + $urandom % 5; r0 = n_ready;
      for (int f = 0; f < nf; f++) body(f, f != nf - 1, 1 + $urandom % 100, 1);
      check(n_ready == r0 + 1, "ready once per MSDU"); check_msdu();
    end
    // overflow: 1000 words then 40 more in a second fragment
    body(0, 1, 1000, 1); msdu.delete();
    fn = 1; mf = 0; fs = 1; @(negedge clk); fs = 0;
    for (int i = 0; i < 40; i++) begin w = $urandom; en = 1; ws = 1; @(negedge clk); en = 0; ws = 0; end
    check(err && code == RX_BYTE_COUNT, "overflow past 2 KB flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
