// crc_lfsr2: bit-serial CRC with the modified linear feedback shift
// register (LFSR2).
//
// The incoming message bit is XORed with the most significant register bit
// to form the feedback, which is added into every stage whose polynomial
// coefficient is 1 while the register shifts up by one:
//   fb = crc[R-1] ^ msg_bit;  crc <= (crc << 1) ^ (fb ? POLY : 0)
// Because the message enters at the top, no r zero bits have to be shifted
// in after the message: the register holds the CRC right after the last
// message bit (one bit per clock, msg_valid high). This is the recurrence
// the parallel array evaluates N steps at a time. The defaults are the
// 4-bit example with taps x^4, x^3, x^1, x^0 (POLY holds the coefficients
// below x^R). The clear input and the valid qualifier are this design's
// additions.
module crc_lfsr2 #(
  parameter int unsigned   R    = 4,
  parameter logic [R-1:0]  POLY = 4'b1011
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         msg_valid,
  input  logic         msg_bit,
  output logic [R-1:0] crc
);

  logic fb;

  assign fb = crc[R-1] ^ msg_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         crc <= '0;
    else if (clear)     crc <= '0;
    else if (msg_valid) crc <= (crc << 1) ^ (fb ? POLY : '0);
  end

endmodule
