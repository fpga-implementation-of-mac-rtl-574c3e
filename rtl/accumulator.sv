// accumulator -- W-bit accumulator register of the MAC unit.
//
// Holds the running sum of products. On every rising clock edge it loads
// d, the adder's output (previous sum plus the new product), so the MAC
// accumulates one product per clock. reset is synchronous and active high
// and clears the register to 0; the reset style and polarity are this
// design's choice. The output q feeds back to the adder and is the MAC output.
module accumulator #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
