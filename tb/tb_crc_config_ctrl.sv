// tb_crc_config_ctrl: starts configuration runs for random polynomials and
// CRC sizes, records every column written, and compares column k with the
// residue x^(N+k) mod P(x)x^(N-r), computed in the testbench by shifting a
// unit vector N times through the serial recurrence. Also checks that each
// column is written once and that done rises N+1 = 33 cycles after start.
module tb_crc_config_ctrl;
  localparam int N = 32;
  localparam int PB = $clog2(N + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] poly = '0;
  logic [PB-1:0] crc_size = PB'(N);
  logic [N-1:0] cfg_col_en, cfg_data;
  logic busy, done;
  logic [N-1:0] got [N];
  int writes [N];
  int checks = 0, failures = 0;

  crc_config_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .poly, .crc_size, .cfg_col_en, .cfg_data, .busy, .done);

  always #5 clk = ~clk;

  // sampled mid-cycle: the values the next rising edge stores
  always @(negedge clk) begin
    for (int j = 0; j < N; j++)
      if (cfg_col_en[j]) begin
        got[j] = cfg_data;
        writes[j]++;
      end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int run = 0; run < 12; run++) begin
      int r, cycles;
      logic [N-1:0] p, v;
      r = (run == 0) ? N : (run == 1) ? 16 : (run == 2) ? 4 : $urandom_range(1, N);
      @(negedge clk);
      poly = $urandom;
      if (run == 0) poly = 32'h04C11DB7;
      crc_size = PB'(r);
      for (int j = 0; j < N; j++) writes[j] = 0;
      start = 1;
      @(posedge clk);
      cycles = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin
        @(posedge clk);
        cycles++;
        #1;
      end
      checks++;
      if (cycles != N + 1) begin
        failures++;
        $display("configuration took %0d cycles", cycles);
      end
      p = (poly & ((r == N) ? '1 : ((N'(1) << r) - 1))) << (N - r);
      for (int k = 0; k < N; k++) begin
        v = N'(1) << k;
        for (int s = 0; s < N; s++) v = (v << 1) ^ (v[N-1] ? p : '0);
        checks++;
        if (got[k] !== v || writes[k] != 1) begin
          failures++;
          $display("r=%0d column %0d got=%h exp=%h writes=%0d", r, k, got[k], v, writes[k]);
        end
      end
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (cfg_col_en !== '0 || busy || !done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
