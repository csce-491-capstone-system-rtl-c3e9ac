// tb_frame_control_decoder: checks the Frame Control header checks and the decoded fields.
// Random and directed header words with byte counts are presented with Enable_FCD; the error
// code must be 0010 for a protocol version other than 0, 0011 for an unknown type/subtype,
// 1010 for a byte count that does not fit the frame kind, 0000 otherwise, and on success the
// subtype, type, ToDS/FromDS, MoreFragments and Retry bits must be captured. clear must drop
// the error and FCH_valid.
`timescale 1ns/1ps
module tb_frame_control_decoder;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] w = 0; logic en = 0, ws = 0, clear = 0; logic [11:0] fbc = 0;
  logic mf, rt, fv, err; logic [3:0] sub, code; frame_type_e ty; logic [1:0] ds;
  frame_control_decoder dut (.clk, .rst_n, .SHFTOUT_BUS(w), .Enable_FCD(en), .word_strobe(ws),
    .FrameByteCount(fbc), .clear, .MoreFrag_Bit(mf), .Retry_Bit(rt), .FCH_Subtype(sub),
    .FCH_Type(ty), .tofrom_DS_flags(ds), .FCH_valid(fv), .FCD_ERR(err), .FCD_ERRCODE(code));

  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // header word layout, bit 15 down to 0: Order WEP MoreData PwrMgt Retry MoreFrag FromDS ToDS
  // Subtype[3:0] Type[1:0] ProtocolVersion[1:0]
  function automatic logic [3:0] ref_code(input logic [15:0] h, input int bytes);
    int hdr, body;
    logic [1:0] ty_, pv; logic [3:0] st_;
    pv = h[1:0]; ty_ = h[3:2]; st_ = h[7:4];
    if (pv != 0) return 4'b0010;
    if (!((ty_ == 2'b01 && (st_ == 4'b1011 || st_ == 4'b1100 || st_ == 4'b1101)) ||
          (ty_ == 2'b10 && st_ == 4'b0000))) return 4'b0011;
    if (ty_ == 2'b01) return (bytes == (st_ == 4'b1011 ? 20 : 14)) ? 4'b0000 : 4'b1010;
    hdr = (h[8] && h[9]) ? 30 : 24;
    body = bytes - hdr - 4;
    if (body < 0 || body > 2048 || (h[10] && body >= 2048)) return 4'b1010;
    return 4'b0000;
  endfunction

  task automatic present(input logic [15:0] h, input int bytes);
    logic [3:0] e;
    w = h; fbc = 12'(bytes); en = 1; ws = 1;
    @(negedge clk); en = 0; ws = 0;
    e = ref_code(h, bytes);
    check(code == e && err == (e != 0) && fv == (e == 0),
          $sformatf("header %h bytes %0d: code %b expected %b", h, bytes, code, e));
    if (e == 0)
      check(sub == h[7:4] && ty == frame_type_e'(h[3:2]) && ds == {h[8], h[9]} &&
            mf == h[10] && rt == h[11], $sformatf("fields of %h", h));
    clear = 1; @(negedge clk); clear = 0;
    check(!err && !fv, "clear");
  endtask

  initial begin
    logic [15:0] h;
    int lens [6] = '{14, 20, 28, 156, 2076, 2082};
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    present(16'h00B4, 20);   // RTS
    present(16'h00C4, 14);   // CTS
    present(16'h00D4, 14);   // ACK
    present(16'h00B4, 14);   // RTS with a wrong count
    present(16'h0008, 156);  // Data with a 128-byte body
    present(16'h0408, 156);  // fragment
    present(16'h0408, 2076); // fragment of the full size: not allowed
    present(16'h0008, 2076); // whole 2 KB MSDU
    present(16'h0308, 2082); // four addresses
    present(16'h0009, 156);  // protocol version 1
    present(16'h00E4, 14);   // unknown control subtype
    present(16'h0808, 156);  // retry bit
    for (int i = 0; i < 600; i++) begin
      h = $urandom;
      if ($urandom % 2) h[1:0] = 0;
      if ($urandom % 2) begin
        int k;
        k = $urandom % 4;
        unique case (k) 0: h[7:2] = 6'b101101; 1: h[7:2] = 6'b110001;
                                   2: h[7:2] = 6'b110101; default: h[7:2] = 6'b000010; endcase
      end
      present(h, ($urandom % 3 == 0) ? 12 + $urandom % 2100 : lens[$urandom % 6]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
