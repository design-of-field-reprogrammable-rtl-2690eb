// tb_crc_config_regs: checks reset values, writes and read-back of every
// CRC variable, that a START write gives exactly one cfg_start pulse in the
// next cycle, and the status read-back.
module tb_crc_config_regs;
  import crc_pkg::*;
  localparam int N = 32;
  localparam int PB = $clog2(N + 1);
  logic clk = 0, rst_n = 0, up_wr = 0, cfg_busy = 0, cfg_done = 0;
  reg_addr_e up_addr = REG_POLY;
  logic [N-1:0] up_wdata = '0, up_rdata, poly, init_value;
  logic [PB-1:0] crc_size, port_size;
  logic cfg_start;
  int checks = 0, failures = 0;
  int starts = 0;

  crc_config_regs #(.N(N)) dut (.clk, .rst_n, .up_wr, .up_addr, .up_wdata, .up_rdata, .cfg_busy,
                                .cfg_done, .poly, .crc_size, .port_size, .init_value, .cfg_start);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cfg_start) starts++;

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

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] p, iv;
    #12 rst_n = 1;
    chk(poly == 32'h04C11DB7, "reset poly");
    chk(crc_size == PB'(N) && port_size == PB'(N) && init_value == '0, "reset sizes");
    repeat (20) begin
      p = $urandom; iv = $urandom;
      write(REG_POLY, p);
      write(REG_INIT, iv);
      write(REG_CRC_SIZE, N'($urandom_range(1, N)));
      write(REG_PORT_SIZE, 32'd16);
      chk(poly == p && init_value == iv && port_size == 6'd16, "written values");
      up_addr = REG_POLY; #1 chk(up_rdata == p, "read poly");
      up_addr = REG_INIT; #1 chk(up_rdata == iv, "read init");
      up_addr = REG_CRC_SIZE; #1 chk(up_rdata == N'(crc_size), "read crc size");
      chk(starts == 0 && !cfg_start, "no start without START write");
    end
    @(negedge clk);
    up_wr = 1; up_addr = REG_START;
    @(negedge clk);
    up_wr = 0;
    chk(cfg_start == 1, "start pulse in next cycle");
    @(negedge clk);
    chk(cfg_start == 0 && starts == 1, "single start pulse");
    cfg_busy = 1; cfg_done = 0; up_addr = REG_STATUS; #1 chk(up_rdata == 32'd1, "status busy");
    cfg_busy = 0; cfg_done = 1; #1 chk(up_rdata == 32'd2, "status done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
