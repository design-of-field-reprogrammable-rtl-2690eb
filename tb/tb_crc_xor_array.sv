// tb_crc_xor_array: writes a random N x N matrix into the array one
// column per cycle, then checks row_out = row_in ^ (D * col_in) over GF(2)
// for random vectors, computed bit by bit in the testbench. Also checks
// that an unconfigured (reset) array passes the row inputs through. The
// same stimulus drives arrays whose configuration flip-flops are merged in
// groups of 4 (default), 2 and 1 (one flip-flop per cell); all must agree.
module tb_crc_xor_array;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] cfg_col_en = '0, cfg_data = '0, col_in = '0, row_in = '0, row_out, row_out2, row_out1;
  logic [N-1:0] dmat [N];   // dmat[j] = column j, bit i = D[i][j]
  int checks = 0, failures = 0;

  crc_xor_array #(.N(N), .MBFF_BITS(4)) dut (.clk, .rst_n, .cfg_col_en, .cfg_data, .col_in, .row_in, .row_out);
  crc_xor_array #(.N(N), .MBFF_BITS(2)) dut2 (.clk, .rst_n, .cfg_col_en, .cfg_data, .col_in, .row_in, .row_out(row_out2));
  crc_xor_array #(.N(N), .MBFF_BITS(1)) dut1 (.clk, .rst_n, .cfg_col_en, .cfg_data, .col_in, .row_in, .row_out(row_out1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vectors(int n);
    logic [N-1:0] exp;
    repeat (n) begin
      col_in = $urandom;
      row_in = $urandom;
      #1;
      exp = row_in;
      for (int j = 0; j < N; j++)
        if (col_in[j]) exp ^= dmat[j];
      checks++;
      if (row_out !== exp) begin
        failures++;
        $display("row_out=%h exp=%h", row_out, exp);
      end
      checks++;
      if (row_out2 !== exp || row_out1 !== exp) begin
        failures++;
        $display("2-bit/1-bit MBFF arrays: %h %h exp=%h", row_out2, row_out1, exp);
      end
    end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int j = 0; j < N; j++) dmat[j] = '0;
    check_vectors(10);
    repeat (3) begin
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        cfg_col_en = '0;
        cfg_col_en[j] = 1'b1;
        cfg_data = $urandom;
        dmat[j] = cfg_data;
        @(posedge clk);
      end
      @(negedge clk);
      cfg_col_en = '0;
      cfg_data = $urandom;
      @(posedge clk);
      #1;
      check_vectors(50);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
