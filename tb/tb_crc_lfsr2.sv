// tb_crc_lfsr2: the long-division example 1010101010 / 10011 (remainder
// 0100, zeros appended) run through a 4-bit LFSR2 with x^4+x+1, and random
// messages through the default x^4+x^3+x+1 register compared with the
// remainder of M(x)*x^4 computed by polynomial long division in the
// testbench.
module tb_crc_lfsr2;
  logic clk = 0, rst_n = 0, clear = 0, msg_valid = 0, msg_bit = 0;
  logic [3:0] crc_a, crc_b;
  int checks = 0, failures = 0;

  crc_lfsr2 #(.R(4), .POLY(4'b0011)) dut_a (.clk, .rst_n, .clear, .msg_valid, .msg_bit, .crc(crc_a));
  crc_lfsr2 dut_b (.clk, .rst_n, .clear, .msg_valid, .msg_bit, .crc(crc_b));

  always #5 clk = ~clk;

  // remainder of (msg * x^4) / g, g including its x^4 term
  function automatic logic [3:0] divide(logic [63:0] msg, int len, logic [4:0] g);
    logic [67:0] rem;
    if (len < 64) msg &= (64'd1 << len) - 1;
    rem = 68'(msg) << 4;
    for (int b = len + 3; b >= 4; b--)
      if (rem[b]) rem[b -: 5] ^= g;
    return rem[3:0];
  endfunction

  task automatic send(logic [63:0] msg, int len);
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int b = len - 1; b >= 0; b--) begin
      msg_valid = 1; msg_bit = msg[b];
      @(negedge clk);
    end
    msg_valid = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    send(64'b1010101010, 10);
    checks++;
    if (crc_a !== 4'b0100) begin
      failures++;
      $display("example: crc=%b exp=0100", crc_a);
    end
    repeat (100) begin
      automatic logic [63:0] m = {$urandom, $urandom};
      automatic int len = $urandom_range(1, 64);
      send(m, len);
      checks += 2;
      if (crc_a !== divide(m, len, 5'b10011)) begin failures++; $display("a wrong"); end
      if (crc_b !== divide(m, len, 5'b11011)) begin failures++; $display("b wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
