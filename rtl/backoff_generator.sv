// backoff_generator: the exponential backoff block of the DCF.
//
// Three parts, as in the backoff generator figure: the CW calculator doubles the contention
// window with each retry, CW = min((CW_MIN + 1) * 2^n - 1, CW_MAX), where n is the larger of
// the short and long retry counts SSRC and SLRC; the random number generator is a free-running
// 16-bit maximal-length LFSR whose low bits, masked with CW, give a number in [0, CW] (CW is
// always one less than a power of two); the backoff time calculator multiplies it by the slot
// time. start is the request from the control logic; done pulses one cycle later with
// backoff_time in clock cycles and the CW that was used. CW_MIN = 7 and CW_MAX = 255 are the
// values of the contention window figure.
module backoff_generator #(
  parameter int unsigned CW_MIN    = 7,
  parameter int unsigned CW_MAX    = 255,
  parameter int unsigned SLOT_TIME = 20,
  parameter logic [15:0] SEED      = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  SSRC,
  input  logic [3:0]  SLRC,
  output logic        done,
  output logic [9:0]  cw,
  output logic [19:0] backoff_time
);
  logic [15:0] lfsr;
  logic [3:0]  n;
  logic [9:0]  cw_calc;
  logic [19:0] wide;

  assign n = (SSRC > SLRC) ? SSRC : SLRC;

  always_comb begin
    wide = (20'(CW_MIN) + 20'd1) << n;
    wide = wide - 20'd1;
    cw_calc = (wide > 20'(CW_MAX)) ? 10'(CW_MAX) : wide[9:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr         <= SEED;
      done         <= 1'b0;
      cw           <= 10'(CW_MIN);
      backoff_time <= '0;
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      done <= start;
      if (start) begin
        cw           <= cw_calc;
        backoff_time <= 20'(lfsr[9:0] & cw_calc) * 20'(SLOT_TIME);
      end
    end
  end
endmodule
