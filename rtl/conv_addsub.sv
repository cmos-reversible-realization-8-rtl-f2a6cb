// conv_addsub -- conventional WIDTH-bit adder/subtractor.
//
// A multiplexer chooses the adder's second operand under the enable bit:
// B when en = 0, the complement ~B when en = 1. A carry-lookahead adder adds
// it to A with carry-in en, so en = 1 computes A + ~B + 1, A plus the 2's
// complement of B, which is A - B modulo 2^WIDTH.
//   en = 0: s = a + b, c_out = carry out.
//   en = 1: s = a - b, c_out = 1 when no borrow (a >= b).
//
// The complement / multiplexer / carry-lookahead structure follows the
// design; feeding the +1 through the carry-in is this design's choice.
// Purely combinational.
module conv_addsub #(
  parameter int unsigned WIDTH = addsub_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             en,
  output logic [WIDTH-1:0] s,
  output logic             c_out
);

  logic [WIDTH-1:0] b_n;
  logic [WIDTH-1:0] b_sel;

  complementer #(.WIDTH(WIDTH)) u_comp (
    .b   (b),
    .b_n (b_n)
  );

  operand_mux #(.WIDTH(WIDTH)) u_mux (
    .d0  (b),
    .d1  (b_n),
    .sel (en),
    .y   (b_sel)
  );

  cla_adder #(.WIDTH(WIDTH)) u_cla (
    .a     (a),
    .b     (b_sel),
    .c_in  (en),
    .s     (s),
    .c_out (c_out)
  );

endmodule
