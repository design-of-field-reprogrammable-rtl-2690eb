// tb_crc_port_router: checks that the routed inputs, multiplied by the
// N-step matrix D = F^N and added to the row inputs, give exactly W steps
// of the bit-serial LFSR2 recurrence, for random polynomials, previous CRC
// values, data and every port width W = 1..N. D is built in the testbench
// by stepping unit vectors through the serial recurrence.
module tb_crc_port_router;
  localparam int N = 32;
  localparam int PB = $clog2(N + 1);
  logic [N-1:0] data, prev_crc, col_in, row_in;
  logic [PB-1:0] port_bits;
  logic [N-1:0] poly;
  logic [N-1:0] dcol [N];
  int checks = 0, failures = 0;

  crc_port_router #(.N(N)) dut (.data, .port_bits, .prev_crc, .col_in, .row_in);

  function automatic logic [N-1:0] step(logic [N-1:0] v, logic b, logic [N-1:0] p);
    logic fb = v[N-1] ^ b;
    return (v << 1) ^ (fb ? p : '0);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20) begin
      poly = $urandom;
      for (int j = 0; j < N; j++) begin
        dcol[j] = N'(1) << j;
        for (int s = 0; s < N; s++) dcol[j] = step(dcol[j], 1'b0, poly);
      end
      for (int w = 1; w <= N; w++) begin
        repeat (5) begin
          logic [N-1:0] exp, got;
          data = $urandom;
          prev_crc = $urandom;
          port_bits = PB'(w);
          #1;
          exp = prev_crc;
          for (int b = w - 1; b >= 0; b--) exp = step(exp, data[b], poly);
          got = row_in;
          for (int j = 0; j < N; j++) if (col_in[j]) got ^= dcol[j];
          checks++;
          if (got !== exp) begin
            failures++;
            $display("W=%0d got=%h exp=%h", w, got, exp);
          end
        end
      end
    end
    // port_bits = 0 is treated as a full word
    data = $urandom; prev_crc = $urandom; port_bits = '0;
    #1;
    checks++;
    if (col_in !== (data ^ prev_crc) || row_in !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
