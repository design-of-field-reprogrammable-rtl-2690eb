// crc_config_ctrl: configuration circuitry that computes the D matrix and
// loads it into the XOR array.
//
// The T matrix is the companion matrix of the polynomial aligned to N bits,
// P'(x) = P(x) * x^(N-r):  (T v)[i] = v[i-1] ^ (v[N-1] & p'[i]).
// Row k of the D matrix is the residue x^(N+k) mod P', which is column k
// of F^N and configures array column k. Each row follows from the one
// before through crc_drow_calc, so one row is produced per clock:
//
//   cycle 1       start seen: row register <= x^(N-1), counter <= 0
//   cycle 1+k+1   row k = T * row(k-1) is written into column k
//                 (cfg_col_en one-hot at k, cfg_data = row k), k = 0..N-1
//
// A full configuration takes N+1 = 33 cycles for N = 32: done rises N+1
// clock edges after the edge that sampled start. busy is high while rows
// are written. Re-starting while busy restarts the sequence.
// poly holds the r low-order coefficients (the x^r term is implied);
// crc_size r of 0 or above N is taken as N. The one-cycle initialisation
// and the counter width are this design's choices.
module crc_config_ctrl #(
  parameter int unsigned N  = 32,
  localparam int unsigned PB = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  poly,
  input  logic [PB-1:0] crc_size,
  output logic [N-1:0]  cfg_col_en,
  output logic [N-1:0]  cfg_data,
  output logic          busy,
  output logic          done
);

  logic [PB-1:0]  r;
  logic [N-1:0]   p_aligned;
  logic [N*N-1:0] t_matrix;
  logic [N-1:0]   d_row_q;
  logic [N-1:0]   d_next;
  logic [PB-1:0]  cnt_q;

  // Matrix computation: T from the aligned polynomial.
  always_comb begin
    r         = (crc_size == '0 || crc_size > PB'(N)) ? PB'(N) : crc_size;
    p_aligned = (poly & ({N{1'b1}} >> (PB'(N) - r))) << (PB'(N) - r);
    t_matrix  = '0;
    for (int i = 0; i < N; i++) begin
      if (i > 0) t_matrix[i*N + (i-1)] = 1'b1;
      t_matrix[i*N + (N-1)] = p_aligned[i];
    end
  end

  crc_drow_calc #(.N(N)) u_drow (
    .t_matrix(t_matrix),
    .d_row   (d_row_q),
    .d_next  (d_next)
  );

  // Counter and row register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_row_q <= '0;
      cnt_q   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else if (start) begin
      d_row_q <= N'(1) << (N-1);
      cnt_q   <= '0;
      busy    <= 1'b1;
      done    <= 1'b0;
    end else if (busy) begin
      d_row_q <= d_next;
      cnt_q   <= cnt_q + 1'b1;
      if (cnt_q == PB'(N-1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // Configuration enable: one column per cycle while busy.
  always_comb begin
    for (int k = 0; k < N; k++) cfg_col_en[k] = busy && (cnt_q == PB'(k));
    cfg_data = d_next;
  end

  a_onehot_en: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cfg_col_en));

endmodule
