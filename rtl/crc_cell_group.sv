// crc_cell_group: MBFF_BITS array cells of one column sharing one
// multi-bit configuration flip-flop.
//
// All cells of a column are configured in the same cycle (one Config Enable
// per column), so grouping MBFF_BITS consecutive rows of a column into one
// multi-bit flip-flop keeps a single enable per flip-flop. Cell k of the
// group computes row_out[k] = cfg[k] ? row_in[k] ^ col_in : row_in[k], where
// cfg is the stored configuration. Which cells are merged is this design's
// choice; MBFF_BITS = 1 gives the conventional one-register-per-cell array.
//
// Timing: cfg_data is captured at the rising edge when cfg_en is high; the
// data path is combinational.
module crc_cell_group #(
  parameter int unsigned MBFF_BITS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_en,
  input  logic [MBFF_BITS-1:0] cfg_data,
  input  logic                 col_in,
  input  logic [MBFF_BITS-1:0] row_in,
  output logic [MBFF_BITS-1:0] row_out
);

  logic [MBFF_BITS-1:0] cfg_q;

  mbff #(.BITS(MBFF_BITS)) u_cfg (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (cfg_en),
    .d    (cfg_data),
    .q    (cfg_q)
  );

  for (genvar k = 0; k < MBFF_BITS; k++) begin : g_cell
    crc_cell u_cell (
      .in0(col_in),
      .in1(row_in[k]),
      .cfg(cfg_q[k]),
      .out(row_out[k])
    );
  end

endmodule
