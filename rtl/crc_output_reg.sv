// crc_output_reg: CRC output registers and previous-CRC feedback.
//
// Holds the N-bit CRC state. For every accepted word (in_valid) the array's
// row outputs are registered; crc_valid follows one cycle later, with
// crc_last set when the word was the last of its message. The state feeds
// back to the port router as prev_crc. On the first word of a message the
// feedback is the initial value instead of the register.
//
// CRC size: an r-bit CRC runs in the N-bit register as the CRC of
// P(x)*x^(N-r); its r bits sit at the top of the register and the low N-r
// bits stay zero. This block therefore moves the initial value up by N-r
// and presents crc_out = state >> (N-r), the r-bit CRC in the low bits.
// The configurable initial value, the alignment and the valid/first/last
// handshake are this design's choices; no final XOR or bit reflection is
// applied. crc_size of 0 or above N is taken as N.
module crc_output_reg #(
  parameter int unsigned N  = 32,
  localparam int unsigned PB = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [PB-1:0] crc_size,
  input  logic [N-1:0]  init_value,
  input  logic [N-1:0]  array_out,
  output logic [N-1:0]  prev_crc,
  output logic [N-1:0]  crc_out,
  output logic          crc_valid,
  output logic          crc_last
);

  logic [PB-1:0] r;
  logic [N-1:0]  state_q;
  logic [N-1:0]  init_aligned;

  always_comb begin
    r            = (crc_size == '0 || crc_size > PB'(N)) ? PB'(N) : crc_size;
    init_aligned = (init_value & ({N{1'b1}} >> (PB'(N) - r))) << (PB'(N) - r);
    prev_crc     = in_first ? init_aligned : state_q;
    crc_out      = state_q >> (PB'(N) - r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= '0;
      crc_valid <= 1'b0;
      crc_last  <= 1'b0;
    end else begin
      crc_valid <= in_valid;
      crc_last  <= in_valid & in_last;
      if (in_valid) state_q <= array_out;
    end
  end

endmodule
