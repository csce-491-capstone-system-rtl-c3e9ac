// tb_word_selector: checks, for every ATN state, which field decoder is enabled.
// Exactly one enable must be high in each field state (none in SKIP), ADDR_Enable must be
// the OR of the four address enables, and the CRC must cover every field before the FCS.
`timescale 1ns/1ps
module tb_word_selector;
  import mac_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  atn_state_e st;
  logic fcd, did, aen, scd, fbd, fcs, crc; logic [3:0] ae, sel;
  word_selector dut (.current_atn_state(st), .Enable_FCD(fcd), .Enable_DID(did),
    .addr_enables(ae), .ADDR_Enable(aen), .Enable_SCD(scd), .Enable_FBD(fbd),
    .Enable_FCS(fcs), .en_crc(crc), .blk_select(sel));

  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [9:0] expv, got;
    for (int s = 0; s < 10; s++) begin
      st = atn_state_e'(s); #1;
      // expected one-hot {fcd,did,a1,a2,a3,a4,scd,fbd,fcs}
      unique case (atn_state_e'(s))
        ATN_HEADER: expv = 10'b1000000000;
        ATN_DID:    expv = 10'b0100000000;
        ATN_ADDR1:  expv = 10'b0010000000;
        ATN_ADDR2:  expv = 10'b0001000000;
        ATN_ADDR3:  expv = 10'b0000100000;
        ATN_ADDR4:  expv = 10'b0000010000;
        ATN_SEQ:    expv = 10'b0000001000;
        ATN_BODY:   expv = 10'b0000000100;
        ATN_FCS:    expv = 10'b0000000010;
        default:    expv = 10'b0000000000;
      endcase
      got = {fcd, did, ae[0], ae[1], ae[2], ae[3], scd, fbd, fcs, 1'b0};
      check(got == expv, $sformatf("state %0d enables %b expected %b", s, got, expv));
      check(aen == |ae, "ADDR_Enable is the OR of the address enables");
      check(crc == (|expv[9:2]), $sformatf("state %0d CRC coverage", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
