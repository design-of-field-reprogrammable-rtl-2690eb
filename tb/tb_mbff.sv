// tb_mbff: checks the multi-bit flip-flop against a reference register:
// reset clears all bits, en loads d at the clock edge, otherwise q holds.
module tb_mbff;
  localparam int B = 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic [B-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  mbff #(.BITS(B)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (q !== '0) failures++;
    rst_n = 1;
    model = '0;
    repeat (300) begin
      @(negedge clk);
      en = $urandom_range(0, 1) == 1;
      d  = B'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch q=%h exp=%h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
