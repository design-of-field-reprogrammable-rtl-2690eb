// crc_xor_array: the configurable N x N XOR array holding the D matrix.
//
// Column line j (col_in[j]) runs down column j and feeds Input 0 of every
// cell in it; the running XOR of row i starts at the left with row_in[i],
// passes through the cells of columns 0..N-1 and leaves on the right as
// row_out[i]. With D[i][j] the configuration of cell (i, j):
//
//   row_out[i] = row_in[i] ^ XOR_j (D[i][j] & col_in[j])
//
// i.e. a GF(2) matrix-vector product plus the row inputs. Configuration is
// written one column at a time: when cfg_col_en[j] is high, cfg_data[i] is
// stored as D[i][j] at the rising edge. Each column's configuration bits are
// held in multi-bit flip-flops of MBFF_BITS rows (crc_cell_group). N is 32 in
// the published configuration; N must be a multiple of MBFF_BITS.
// The data path is combinational; only the configuration is clocked.
module crc_xor_array #(
  parameter int unsigned N         = 32,
  parameter int unsigned MBFF_BITS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] cfg_col_en,
  input  logic [N-1:0] cfg_data,
  input  logic [N-1:0] col_in,
  input  logic [N-1:0] row_in,
  output logic [N-1:0] row_out
);

  localparam int unsigned GROUPS = N / MBFF_BITS;

  if (N % MBFF_BITS != 0) begin : g_size_check
    $error("crc_xor_array: N must be a multiple of MBFF_BITS");
  end

  // chain[j][i]: running XOR of row i entering column j.
  logic [N-1:0] chain [N+1];

  assign chain[0] = row_in;

  for (genvar j = 0; j < N; j++) begin : g_col
    for (genvar g = 0; g < GROUPS; g++) begin : g_grp
      crc_cell_group #(.MBFF_BITS(MBFF_BITS)) u_grp (
        .clk     (clk),
        .rst_n   (rst_n),
        .cfg_en  (cfg_col_en[j]),
        .cfg_data(cfg_data[g*MBFF_BITS +: MBFF_BITS]),
        .col_in  (col_in[j]),
        .row_in  (chain[j][g*MBFF_BITS +: MBFF_BITS]),
        .row_out (chain[j+1][g*MBFF_BITS +: MBFF_BITS])
      );
    end
  end

  assign row_out = chain[N];

endmodule
