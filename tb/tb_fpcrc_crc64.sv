// tb_fpcrc_crc64: the field programmable CRC built 64 cells wide (N = 64)
// for 64-bit CRCs. Configures CRC-64/ECMA-182 (42F0E1EBA9EA3693, initial
// value 0) and checks the published check value of "123456789"
// (6C40DF5F0B497347) with a 64-bit word and an 8-bit last word, then random
// messages against a bit-serial reference, and a CRC-32 run on the same
// 64-wide array (CRC size below N) with 32-bit words.
module tb_fpcrc_crc64;
  import crc_pkg::*;
  localparam int N = 64;
  localparam int PB = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic up_wr = 0;
  reg_addr_e up_addr = REG_POLY;
  logic [N-1:0] up_wdata = '0, up_rdata;
  logic cfg_busy, cfg_done;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [PB-1:0] in_last_bits = '0;
  logic [N-1:0] in_data = '0;
  logic in_ready, crc_valid, crc_last;
  logic [N-1:0] crc_out;
  logic ser_clear = 0, ser_valid = 0, ser_bit = 0;
  logic [3:0] ser_crc;
  int checks = 0, failures = 0;
  logic [N-1:0] cur_poly, cur_init;
  int cur_r, cur_w;

  fpcrc_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(reg_addr_e a, logic [N-1:0] d);
    @(negedge clk);
    up_wr = 1; up_addr = a; up_wdata = d;
    @(negedge clk);
    up_wr = 0;
  endtask

  function automatic logic [N-1:0] ref_crc(logic [N-1:0] poly, int r, logic [N-1:0] init,
                                           logic bits[$]);
    logic [N:0] m = ((N+1)'(1) << r) - 1;
    logic [N:0] c = (N+1)'(init) & m;
    logic [N:0] p = (N+1)'(poly) & m;
    foreach (bits[i]) begin
      logic fb = c[r-1] ^ bits[i];
      c = ((c << 1) ^ (fb ? p : '0)) & m;
    end
    return N'(c);
  endfunction

  task automatic configure(logic [N-1:0] poly, int r, int w, logic [N-1:0] init);
    int cycles = 0;
    write(REG_POLY, poly);
    write(REG_CRC_SIZE, N'(r));
    write(REG_PORT_SIZE, N'(w));
    write(REG_INIT, init);
    write(REG_START, '0);
    do begin
      @(posedge clk);
      cycles++;
      #1;
    end while (!cfg_done);
    chk(cycles == N + 1, $sformatf("configuration took %0d cycles", cycles));
    cur_poly = poly; cur_r = r; cur_w = w; cur_init = init;
  endtask

  task automatic send(logic [N-1:0] words[$], int last_bits, logic use_exp, logic [N-1:0] exp);
    logic bits[$];
    logic [N-1:0] ref_v;
    int nw = words.size();
    for (int k = 0; k < nw; k++) begin
      int wb = (k == nw - 1) ? last_bits : cur_w;
      for (int b = wb - 1; b >= 0; b--) bits.push_back(words[k][b]);
    end
    ref_v = use_exp ? exp : ref_crc(cur_poly, cur_r, cur_init, bits);
    for (int k = 0; k < nw; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_first = (k == 0);
      in_last  = (k == nw - 1);
      in_last_bits = (k == nw - 1 && last_bits != cur_w) ? PB'(last_bits) : '0;
      in_data  = words[k];
      @(posedge clk);
      #1;
      chk(crc_valid, "CRC valid one cycle after its word");
    end
    chk(crc_out == ref_v, $sformatf("crc=%h exp=%h (r=%0d w=%0d)", crc_out, ref_v, cur_r, cur_w));
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0; in_last_bits = '0;
  endtask

  task automatic random_message();
    logic [N-1:0] words[$];
    int nw = $urandom_range(1, 5);
    int lb = $urandom_range(1, cur_w);
    for (int k = 0; k < nw; k++) begin
      logic [N-1:0] wd = {$urandom, $urandom};
      int wb = (k == nw - 1) ? lb : cur_w;
      if (wb < N) wd &= (N'(1) << wb) - 1;
      words.push_back(wd);
    end
    send(words, lb, 1'b0, '0);
  endtask

  initial begin
    logic [N-1:0] words[$];
    #12 rst_n = 1;
    configure(64'h42F0E1EBA9EA3693, 64, 64, '0);
    words = '{64'h3132333435363738, 64'h39};
    send(words, 8, 1'b1, 64'h6C40DF5F0B497347);
    repeat (20) random_message();
    configure(64'h04C11DB7, 32, 32, 64'hFFFFFFFF);
    words = '{64'h31323334, 64'h35363738, 64'h39};
    send(words, 8, 1'b1, 64'h0376E6E7);
    repeat (10) random_message();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
