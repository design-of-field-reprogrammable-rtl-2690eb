// fpcrc_top: field programmable parallel CRC built from multi-bit
// flip-flops.
//
// A processor loads the CRC variables (polynomial, CRC size r, port width
// W, initial value) into crc_config_regs and writes REG_START. The
// configuration circuitry (crc_config_ctrl) then computes the D matrix one
// row per clock and writes it, column by column, into the N x N XOR array,
// whose configuration bits live in MBFF_BITS-bit multi-bit flip-flops; this
// takes N+1 cycles (33 for N = 32), during which in_ready is low (it is
// also low in the cycle of the start pulse, so no word slips in while the
// array is about to be rewritten).
//
// Once configured, the array computes one word of up to N message bits per
// clock: the port router combines the word with the previous CRC, the array
// multiplies by D, and the output registers hold the new CRC. in_first
// marks the first word of a message (the initial value is used as the
// previous CRC), in_last the last; the last word may carry fewer bits
// (in_last_bits, 0 meaning the configured port width). crc_out (r bits in
// the low positions) is valid one cycle after its word, with crc_valid, and
// crc_last when it is the finished CRC of a message. Words carry their
// valid bits in in_data[W-1:0], in_data[W-1] being first in message order.
//
// Beside the array, a bit-serial LFSR2 (crc_lfsr2, the 4-bit example
// polynomial x^4+x^3+x+1) has its own ports ser_*.
//
// The array, cell, D-matrix computation, port/CRC size multiplexing and
// MBFF-based configuration storage follow the published architecture; the
// bus protocol, handshake, register map, initial value and the grouping of
// cells into MBFFs are this design's choices.
module fpcrc_top
  import crc_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned MBFF_BITS = 4,
  localparam int unsigned PB       = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor bus
  input  logic          up_wr,
  input  reg_addr_e     up_addr,
  input  logic [N-1:0]  up_wdata,
  output logic [N-1:0]  up_rdata,
  // configuration status
  output logic          cfg_busy,
  output logic          cfg_done,
  // payload words
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [PB-1:0] in_last_bits,
  input  logic [N-1:0]  in_data,
  output logic          in_ready,
  // CRC results
  output logic          crc_valid,
  output logic          crc_last,
  output logic [N-1:0]  crc_out,
  // bit-serial LFSR2
  input  logic          ser_clear,
  input  logic          ser_valid,
  input  logic          ser_bit,
  output logic [3:0]    ser_crc
);

  logic [N-1:0]  poly, init_value;
  logic [PB-1:0] crc_size, port_size, port_bits;
  logic          cfg_start, accept;
  logic [N-1:0]  cfg_col_en, cfg_data;
  logic [N-1:0]  prev_crc, col_in, row_in, row_out;

  crc_config_regs #(.N(N)) u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .up_wr     (up_wr),
    .up_addr   (up_addr),
    .up_wdata  (up_wdata),
    .up_rdata  (up_rdata),
    .cfg_busy  (cfg_busy),
    .cfg_done  (cfg_done),
    .poly      (poly),
    .crc_size  (crc_size),
    .port_size (port_size),
    .init_value(init_value),
    .cfg_start (cfg_start)
  );

  crc_config_ctrl #(.N(N)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (cfg_start),
    .poly      (poly),
    .crc_size  (crc_size),
    .cfg_col_en(cfg_col_en),
    .cfg_data  (cfg_data),
    .busy      (cfg_busy),
    .done      (cfg_done)
  );

  assign in_ready  = cfg_done & ~cfg_busy & ~cfg_start;
  assign accept    = in_valid & in_ready;
  assign port_bits = (in_last && in_last_bits != '0) ? in_last_bits : port_size;

  crc_port_router #(.N(N)) u_router (
    .data     (in_data),
    .port_bits(port_bits),
    .prev_crc (prev_crc),
    .col_in   (col_in),
    .row_in   (row_in)
  );

  crc_xor_array #(.N(N), .MBFF_BITS(MBFF_BITS)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_col_en(cfg_col_en),
    .cfg_data  (cfg_data),
    .col_in    (col_in),
    .row_in    (row_in),
    .row_out   (row_out)
  );

  crc_output_reg #(.N(N)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (accept),
    .in_first  (in_first),
    .in_last   (in_last),
    .crc_size  (crc_size),
    .init_value(init_value),
    .array_out (row_out),
    .prev_crc  (prev_crc),
    .crc_out   (crc_out),
    .crc_valid (crc_valid),
    .crc_last  (crc_last)
  );

  crc_lfsr2 #(.R(4), .POLY(4'b1011)) u_lfsr2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (ser_clear),
    .msg_valid(ser_valid),
    .msg_bit  (ser_bit),
    .crc      (ser_crc)
  );

endmodule
