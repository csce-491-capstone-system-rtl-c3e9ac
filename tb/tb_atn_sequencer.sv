// tb_atn_sequencer: checks the field order the ATN sequencer walks for each frame kind.
// For RTS, CTS, ACK and Data frames (with and without the fourth address, with bodies of
// several lengths) the state seen with each word must follow the frame layout, and
// frame_end must pulse after the last FCS word. A flush in the middle of a frame must skip
// the rest of its words and end the frame at its byte count.
`timescale 1ns/1ps
module tb_atn_sequencer;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic nw = 0, nf = 0, fv = 0, flush = 0, fe; logic [3:0] sub = 0; logic [1:0] ds = 0;
  logic [11:0] fbc = 0; atn_state_e st;
  atn_sequencer dut (.clk, .rst_n, .new_word(nw), .new_frame(nf), .FCH_valid(fv),
    .frame_subtype(sub), .tofrom_DS_flags(ds), .frame_byte_count(fbc), .flush,
    .current_atn_state(st), .frame_end(fe));

  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int fe_count = 0;
  always @(posedge clk) if (fe) fe_count++;

  // expected state for word k of a frame
  function automatic atn_state_e exp_state(input int k, input logic [3:0] s, input logic [1:0] d,
                                           input int bytes);
    int hdr, bw;
    if (k == 0) return ATN_HEADER;
    if (k == 1) return ATN_DID;
    if (k <= 4) return ATN_ADDR1;
    if (s == ST_CTS || s == ST_ACK) return ATN_FCS;
    if (k <= 7) return ATN_ADDR2;
    if (s == ST_RTS) return ATN_FCS;
    if (k <= 10) return ATN_ADDR3;
    if (k == 11) return ATN_SEQ;
    hdr = (d == 2'b11) ? 15 : 12;
    if (d == 2'b11 && k < 15) return ATN_ADDR4;
    bw = (bytes - 2*hdr - 4) / 2;
    if (k < hdr + bw) return ATN_BODY;
    return ATN_FCS;
  endfunction

  task automatic run_frame(input logic [3:0] s, input logic [1:0] d, input int bytes, input int flush_at);
    int n0;
    n0 = fe_count;
    sub = s; ds = d; fbc = 12'(bytes); fv = 0;
    for (int k = 0; k < bytes / 2; k++) begin
      @(negedge clk);
      if (flush_at < 0 || k <= flush_at)
        check(st == exp_state(k, s, d, bytes), $sformatf("subtype %h ds %b bytes %0d word %0d: state %s expected %s",
              s, d, bytes, k, st.name(), exp_state(k, s, d, bytes).name()));
      else
        check(st == ATN_SKIP, $sformatf("word %0d after flush: %s", k, st.name()));
      nw = 1; nf = (k == 0);
      flush = (k == flush_at);
      @(negedge clk); nw = 0; nf = 0; flush = 0;
      if (k == 0) fv = 1;      // the decoder has checked the header word
      repeat ($urandom % 3) @(negedge clk);
    end
    @(negedge clk);
    check(fe_count == n0 + 1, $sformatf("one frame_end for subtype %h (%0d)", s, fe_count - n0));
    check(st == ATN_HEADER, "back to HEADER");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run_frame(ST_RTS, 2'b00, 20, -1);
    run_frame(ST_CTS, 2'b00, 14, -1);
    run_frame(ST_ACK, 2'b00, 14, -1);
    run_frame(ST_DATA, 2'b00, 28 + 128, -1);
    run_frame(ST_DATA, 2'b01, 28 + 2, -1);
    run_frame(ST_DATA, 2'b11, 34 + 64, -1);
    run_frame(ST_DATA, 2'b00, 28, -1);
    run_frame(ST_DATA, 2'b00, 28 + 200, 9);
    run_frame(ST_RTS, 2'b00, 20, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
