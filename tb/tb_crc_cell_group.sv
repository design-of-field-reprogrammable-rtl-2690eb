// tb_crc_cell_group: loads random configurations into the shared
// multi-bit register and checks every cell's output for random inputs;
// also checks that the configuration holds while cfg_en is low.
module tb_crc_cell_group;
  localparam int B = 4;
  logic clk = 0, rst_n = 0, cfg_en = 0, col_in = 0;
  logic [B-1:0] cfg_data = '0, row_in = '0, row_out, cfg_model;
  int checks = 0, failures = 0;

  crc_cell_group #(.MBFF_BITS(B)) dut (.clk, .rst_n, .cfg_en, .cfg_data, .col_in, .row_in, .row_out);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    cfg_model = '0;
    repeat (200) begin
      @(negedge clk);
      cfg_en   = $urandom_range(0, 3) == 0;
      cfg_data = B'($urandom);
      @(posedge clk);
      if (cfg_en) cfg_model = cfg_data;
      #1 cfg_en = 0;
      repeat (4) begin
        col_in = 1'($urandom);
        row_in = B'($urandom);
        #1;
        for (int k = 0; k < B; k++) begin
          checks++;
          if (row_out[k] !== (cfg_model[k] ? (row_in[k] ^ col_in) : row_in[k])) begin
            failures++;
            $display("cell %0d wrong", k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
