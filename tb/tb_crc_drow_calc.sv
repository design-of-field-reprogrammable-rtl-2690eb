// tb_crc_drow_calc: random T matrices and rows; each output bit is checked
// against a dot product over GF(2) counted in the testbench (parity of the
// number of positions where both T[i][k] and d_row[k] are 1).
module tb_crc_drow_calc;
  localparam int N = 32;
  logic [N*N-1:0] t_matrix;
  logic [N-1:0] d_row, d_next;
  int checks = 0, failures = 0;

  crc_drow_calc #(.N(N)) dut (.t_matrix, .d_row, .d_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) begin
      for (int w = 0; w < N; w++) t_matrix[w*N +: N] = $urandom;
      d_row = $urandom;
      #1;
      for (int i = 0; i < N; i++) begin
        automatic int cnt = 0;
        for (int k = 0; k < N; k++) if (t_matrix[i*N + k] && d_row[k]) cnt++;
        checks++;
        if (d_next[i] !== cnt[0]) begin
          failures++;
          $display("bit %0d wrong", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
