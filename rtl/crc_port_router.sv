// crc_port_router: routes message and previous-CRC bits into the array
// according to the port size of the current word.
//
// The XOR array holds D = F^N, F being the companion matrix of the
// (N-bit aligned) generator polynomial, so a full word of N bits is
// processed as  crc' = D * (crc ^ data).  A word of only W < N valid bits
// (data[W-1:0], data[W-1] first in time) needs W steps of the LFSR2
// recurrence instead. Its top W register bits meet the data and run through
// the feedback; its low N-W bits only shift up by W. Moving the combined
// bits down by N-W lets the same N-step matrix produce the W-step result:
//
//   col_in[j] = data[j] ^ prev_crc[j+N-W]   for j <  W, else 0
//   row_in[i] = prev_crc[i-W]               for i >= W, else 0
//
// so unused input bits are forced to '0', the upper rows receive previous
// CRC data on the left of the array, and the top CRC bits are routed to the
// first columns, as the port-size multiplexers do in the published design.
// The derivation and the support of every W from 1 to N are this design's
// own; a port_bits of 0 or above N is taken as N. Purely combinational.
module crc_port_router #(
  parameter int unsigned N  = 32,
  localparam int unsigned PB = $clog2(N + 1)
) (
  input  logic [N-1:0]  data,
  input  logic [PB-1:0] port_bits,
  input  logic [N-1:0]  prev_crc,
  output logic [N-1:0]  col_in,
  output logic [N-1:0]  row_in
);

  logic [PB-1:0] w;
  logic [N-1:0]  in_mask;

  always_comb begin
    w = (port_bits == '0 || port_bits > PB'(N)) ? PB'(N) : port_bits;
    in_mask = {N{1'b1}} >> (PB'(N) - w);
    col_in  = (data ^ (prev_crc >> (PB'(N) - w))) & in_mask;
    row_in  = (w == PB'(N)) ? '0 : (prev_crc << w);
  end

endmodule
