// reversible_realization2 -- WIDTH-bit reversible adder/subtractor built
// from a cascade of WG gates, one gate per bit.
//
// Gate i takes A = a[i], B = b[i], C = the carry/borrow from gate i-1 and
// D = the mode bit m. Its R output is result bit s[i] and its S output is
// the carry/borrow into gate i+1; P and Q are garbage outputs.
//   m = 0: R/S are the sum/carry of a full adder, s = a + b.
//   m = 1: R/S are the difference/borrow of a full subtractor, s = a - b.
// Results are modulo 2^WIDTH. c_out is the S output of the last gate: the
// carry out when adding, the borrow out (1 when a < b) when subtracting.
//
// The gate wiring (operands on A/B, carry on C, mode on D, R to the result,
// S to the next carry, P/Q to garbage G1..G16) and the port names a, b, m, s
// are those of the design. The carry into gate 0 is a constant 0 in both
// modes, which is this design's reading: a borrow-in of 1 would make the
// subtract mode give a-b-1. The extra ports c_out and garbage are also this
// design's choice, so that no gate output is left unconnected.
//
// Purely combinational, a ripple chain of WIDTH gates.
module reversible_realization2 #(
  parameter int unsigned WIDTH = addsub_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               m,
  output logic [WIDTH-1:0]   s,
  output logic               c_out,
  output logic [2*WIDTH-1:0] garbage
);

  // c[i] is input C of gate i; c[WIDTH] is C8 of the 8-bit circuit.
  logic [WIDTH:0] c;

  assign c[0]  = 1'b0;
  assign c_out = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    wg_gate u_wg (
      .a (a[i]),
      .b (b[i]),
      .c (c[i]),
      .d (m),
      .p (garbage[2*i]),
      .q (garbage[2*i+1]),
      .r (s[i]),
      .s (c[i+1])
    );
  end

endmodule
