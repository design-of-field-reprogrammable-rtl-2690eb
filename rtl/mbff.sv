// mbff: multi-bit flip-flop with load enable.
//
// BITS storage bits share one clock connection, which is what lets a
// multi-bit flip-flop cell share its clock buffer and cut clock power and
// area per bit (1, 2 and 4 bit cells are the sizes considered; 4 is the
// default). Each bit has the load mux of a CRC array cell's configuration
// register: when en is high, q takes d at the rising clock edge, otherwise
// q holds. The asynchronous active-low reset clears every bit; the reset is
// this design's choice.
//
// Interface: clk, rst_n, en, d[BITS-1:0] -> q[BITS-1:0]. One cycle latency.
module mbff #(
  parameter int unsigned BITS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [BITS-1:0] d,
  output logic [BITS-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
