// crc_cell: data path of one programmable CRC array cell.
//
// A cell either adds its column line to the running row sum or lets the row
// sum pass: out = cfg ? (in1 ^ in0) : in1. in0 is the column line (message
// bit combined with CRC feedback), in1 the running XOR coming from the
// previous cell of the same row. The cell's configuration bit (one D matrix
// entry) is stored outside the cell, in a multi-bit flip-flop shared with
// neighbouring cells of the same column (see crc_cell_group); the XOR/bypass
// mux itself follows the published cell. Purely combinational.
module crc_cell (
  input  logic in0,
  input  logic in1,
  input  logic cfg,
  output logic out
);

  always_comb out = cfg ? (in1 ^ in0) : in1;

endmodule
