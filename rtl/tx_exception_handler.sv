// tx_exception_handler: the transmitter's exception thread.
//
// It polls the exception pulses of the medium allocation control (0001 allocation retry
// count exceeded, 0010 frame transmit retry count exceeded), of the frame builder (0101
// invalid station address, 0110 unknown station address) and the transmit timeout event of
// the transmit control block (0100), and the allocation watchdog of the medium allocation
// control (0011). When one comes, it is posted on TX_ERR/TX_ERRCODE for
// the MAC controller. The retry-count and address exceptions end the transaction: abort
// pulses and every transmitter thread returns to its idle state. A transmit timeout or an
// allocation timeout is handled by the retry logic itself, so it is only posted. Several in
// one cycle are taken in the order medium allocation, frame builder, transmit timeout,
// allocation timeout. clear (a new MSDU) resets the status.
module tx_exception_handler
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       ma_err,
  input  logic [3:0] ma_code,
  input  logic       bf_err,
  input  logic [3:0] bf_code,
  input  logic       timeout_evt,
  input  logic       alloc_timeout,
  output logic       abort,
  output logic       TX_ERR,
  output logic [3:0] TX_ERRCODE
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      abort      <= 1'b0;
      TX_ERR     <= 1'b0;
      TX_ERRCODE <= TX_OK;
    end else begin
      abort <= 1'b0;
      if (ma_err) begin
        abort      <= 1'b1;
        TX_ERR     <= 1'b1;
        TX_ERRCODE <= ma_code;
      end else if (bf_err) begin
        abort      <= 1'b1;
        TX_ERR     <= 1'b1;
        TX_ERRCODE <= bf_code;
      end else if (timeout_evt) begin
        TX_ERR     <= 1'b1;
        TX_ERRCODE <= TX_TIMEOUT;
      end else if (alloc_timeout) begin
        TX_ERR     <= 1'b1;
        TX_ERRCODE <= TX_ALLOC_TIMEOUT;
      end else if (clear) begin
        TX_ERR     <= 1'b0;
        TX_ERRCODE <= TX_OK;
      end
    end
  end
endmodule
