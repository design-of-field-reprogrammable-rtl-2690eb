// tb_crc_output_reg: checks the CRC register: the previous-CRC feedback is
// the aligned initial value on a first word and the register otherwise,
// array outputs are registered only for valid words, crc_valid/crc_last
// follow one cycle later, and crc_out is the register moved down by N-r.
module tb_crc_output_reg;
  localparam int N = 32;
  localparam int PB = $clog2(N + 1);
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0;
  logic [PB-1:0] crc_size = PB'(N);
  logic [N-1:0] init_value = '0, array_out = '0, prev_crc, crc_out;
  logic crc_valid, crc_last;
  logic [N-1:0] state;
  int checks = 0, failures = 0;

  crc_output_reg #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .crc_size,
                               .init_value, .array_out, .prev_crc, .crc_out, .crc_valid, .crc_last);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic v, l;
    #12 rst_n = 1;
    state = '0;
    repeat (400) begin
      @(negedge clk);
      r = $urandom_range(1, N);
      crc_size   = PB'(r);
      init_value = $urandom;
      array_out  = $urandom;
      in_valid   = $urandom_range(0, 1) == 1;
      in_first   = $urandom_range(0, 3) == 0;
      in_last    = $urandom_range(0, 1) == 1;
      #1;
      checks++;
      if (prev_crc !== (in_first ? ((init_value << (N - r)) & ~((N'(1) << (N - r)) - 1)) : state)) begin
        failures++;
        $display("prev_crc=%h", prev_crc);
      end
      checks++;
      if (crc_out !== (state >> (N - r))) begin
        failures++;
        $display("crc_out=%h exp=%h", crc_out, state >> (N - r));
      end
      v = in_valid; l = in_last;
      @(posedge clk);
      if (v) state = array_out;
      #1;
      checks++;
      if (crc_valid !== v || crc_last !== (v && l)) begin
        failures++;
        $display("flags wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
