// complementer -- bitwise (1's) complement of the B operand.
//
// The conventional adder/subtractor adds A to the 2's complement of B to
// subtract. This block supplies ~B; the +1 that completes the 2's
// complement enters as the adder's carry-in, which is this design's choice
// (the design only speaks of "the output of the complement").
// Purely combinational.
module complementer #(
  parameter int unsigned WIDTH = addsub_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] b_n
);

  always_comb b_n = ~b;

endmodule
