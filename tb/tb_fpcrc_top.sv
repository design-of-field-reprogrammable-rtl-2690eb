// tb_fpcrc_top: end-to-end test of the field programmable CRC at its
// default size (N = 32, 4-bit MBFFs).
//
// The processor bus configures the circuit several times: CRC-32
// (04C11DB7, initial value FFFFFFFF, 32-bit port), CRC-16 with a 16-bit
// port, a 16-bit CRC on a 32-bit port, the 4-bit long-division example
// (10011, 10-bit port) and random polynomials, CRC sizes, port widths and
// initial values. Results are checked against published check values of
// the string "123456789" and against a bit-serial reference computed in
// the testbench. It also checks the configuration time (N+1 cycles after
// the start pulse), that no word is taken while configuring, that each CRC
// appears one cycle after its word, and exercises the serial LFSR2. Each
// mechanism is counted and one that never happens counts as a failure.
module tb_fpcrc_top;
  import crc_pkg::*;
  localparam int N = 32;
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
  // mechanism counters
  int n_config = 0, n_stall = 0, n_full = 0, n_partial = 0, n_small_crc = 0,
      n_small_port = 0, n_init = 0, n_serial = 0, n_msgs = 0;

  // current configuration, as the testbench knows it
  logic [N-1:0] cur_poly, cur_init;
  int cur_r, cur_w;

  fpcrc_top dut (.*);

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

  // r-bit CRC of a bit sequence, first bit first, by the serial recurrence
  function automatic logic [N-1:0] ref_crc(logic [N-1:0] poly, int r, logic [N-1:0] init,
                                           logic bits[$]);
    logic [N:0] c = (N+1)'(init) & (((N+1)'(1) << r) - 1);
    logic [N:0] p = (N+1)'(poly) & (((N+1)'(1) << r) - 1);
    foreach (bits[i]) begin
      logic fb = c[r-1] ^ bits[i];
      c = (c << 1) ^ (fb ? p : '0);
      c &= ((N+1)'(1) << r) - 1;
    end
    return N'(c);
  endfunction

  task automatic configure(logic [N-1:0] poly, int r, int w, logic [N-1:0] init);
    int cycles;
    write(REG_POLY, poly);
    write(REG_CRC_SIZE, N'(r));
    write(REG_PORT_SIZE, N'(w));
    write(REG_INIT, init);
    write(REG_START, '0);
    // the start pulse is now high; it is sampled at the next edge
    chk(dut.cfg_start == 1'b1, "start pulse");
    // offer a word while configuring: it must not be taken
    in_valid = 1; in_first = 1; in_data = $urandom;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      #1;
      if (cfg_busy) begin
        chk(!in_ready && !crc_valid, $sformatf("no word accepted while configuring ready=%0d crc_valid=%0d", in_ready, crc_valid));
        n_stall++;
      end
    end while (!cfg_done);
    in_valid = 0; in_first = 0;
    chk(cycles == N + 1, $sformatf("configuration took %0d cycles", cycles));
    up_addr = REG_STATUS;
    #1 chk(up_rdata[1:0] == 2'b10, "status reads done");
    cur_poly = poly; cur_r = r; cur_w = w; cur_init = init;
    n_config++;
    if (r < N) n_small_crc++;
    if (w < N) n_small_port++;
    if (init != '0) n_init++;
  endtask

  // send a message of given words (valid bits in the low w, last word
  // last_bits wide) and check the CRC against exp (or the reference)
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
      chk(in_ready, "ready when configured");
      if (k == nw - 1 && last_bits < cur_w) n_partial++; else n_full++;
      @(posedge clk);
      #1;
      chk(crc_valid && (crc_last == (k == nw - 1)), "CRC valid one cycle after its word");
    end
    chk(crc_out == ref_v, $sformatf("crc=%h exp=%h (r=%0d w=%0d)", crc_out, ref_v, cur_r, cur_w));
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0; in_last_bits = '0;
    n_msgs++;
  endtask

  task automatic random_message();
    logic [N-1:0] words[$];
    int nw = $urandom_range(1, 6);
    int lb = $urandom_range(1, cur_w);
    for (int k = 0; k < nw; k++) begin
      logic [N-1:0] wd = $urandom;
      int wb = (k == nw - 1) ? lb : cur_w;
      if (wb < N) wd &= (N'(1) << wb) - 1;
      words.push_back(wd);
    end
    send(words, lb, 1'b0, '0);
  endtask

  initial begin
    logic [N-1:0] words[$];
    #12 rst_n = 1;
    @(negedge clk);
    chk(!in_ready && !cfg_done, "not ready before configuration");

    // CRC-32/MPEG-2: poly 04C11DB7, init FFFFFFFF, no reflection
    configure(32'h04C11DB7, 32, 32, 32'hFFFFFFFF);
    words = '{32'h31323334, 32'h35363738, 32'h00000039};
    send(words, 8, 1'b1, 32'h0376E6E7);
    repeat (20) random_message();

    // CRC-16/UMTS (BUYPASS): poly 8005, init 0, 16-bit port
    configure(32'h8005, 16, 16, 32'h0);
    words = '{32'h3132, 32'h3334, 32'h3536, 32'h3738, 32'h39};
    send(words, 8, 1'b1, 32'hFEE8);
    repeat (10) random_message();

    // CRC-16/XMODEM: poly 1021, init 0, 32-bit port (r < W)
    configure(32'h1021, 16, 32, 32'h0);
    words = '{32'h31323334, 32'h35363738, 32'h00000039};
    send(words, 8, 1'b1, 32'h31C3);

    // long-division example: 1010101010 / 10011 -> 0100, 10-bit port
    configure(32'h3, 4, 10, 32'h0);
    words = '{32'b1010101010};
    send(words, 10, 1'b1, 32'b0100);

    // random configurations
    repeat (12) begin
      automatic logic [N-1:0] p = $urandom;
      automatic int r = $urandom_range(1, N);
      automatic int w = $urandom_range(1, N);
      configure(p, r, w, ($urandom_range(0, 1) == 1) ? N'($urandom) : '0);
      repeat (6) random_message();
    end

    // bit-serial LFSR2 beside the array: x^4+x^3+x+1
    repeat (20) begin
      automatic logic bits[$] = {};
      automatic logic [N-1:0] exp;
      automatic int len = $urandom_range(1, 40);
      @(negedge clk);
      ser_clear = 1;
      @(negedge clk);
      ser_clear = 0;
      for (int b = 0; b < len; b++) begin
        bits.push_back(1'($urandom));
        ser_valid = 1; ser_bit = bits[b];
        @(negedge clk);
      end
      ser_valid = 0;
      exp = ref_crc(32'hB, 4, '0, bits);
      chk(ser_crc == exp[3:0], "serial LFSR2 CRC");
      n_serial++;
    end

    $display("mechanisms: config=%0d stall=%0d full_words=%0d partial_last=%0d crc_lt_N=%0d port_lt_N=%0d init=%0d serial=%0d msgs=%0d",
             n_config, n_stall, n_full, n_partial, n_small_crc, n_small_port, n_init, n_serial, n_msgs);
    if (n_config < 2 || n_stall == 0 || n_full == 0 || n_partial == 0 || n_small_crc == 0 ||
        n_small_port == 0 || n_init == 0 || n_serial == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
