// tb_crc_cell: exhaustive check of the array cell: XOR of both inputs when
// configured, Input 1 passed through otherwise.
module tb_crc_cell;
  logic in0, in1, cfg, out;
  int checks = 0, failures = 0;

  crc_cell dut (.in0, .in1, .cfg, .out);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cfg, in1, in0} = 3'(v);
      #1;
      checks++;
      if (out !== (cfg ? (in0 != in1) : in1)) begin
        failures++;
        $display("cfg=%b in1=%b in0=%b out=%b", cfg, in1, in0, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
