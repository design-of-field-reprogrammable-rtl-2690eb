// crc_drow_calc: computes the next row of the D matrix in one cycle.
//
// Each bit of the new row is an AND-XOR tree over one row of the T matrix
// and the current D row:  d_next[i] = XOR_k (T[i][k] & d_row[k]),
// the structure shown for a 4-bit polynomial and here generalised to N.
// With T the companion matrix of the generator polynomial (multiplication by
// x modulo P), d_next is the polynomial residue of x * d_row.
// t_matrix holds row i of T in bits [i*N +: N]. Purely combinational.
module crc_drow_calc #(
  parameter int unsigned N = 32
) (
  input  logic [N*N-1:0] t_matrix,
  input  logic [N-1:0]   d_row,
  output logic [N-1:0]   d_next
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      d_next[i] = ^(t_matrix[i*N +: N] & d_row);
    end
  end

endmodule
