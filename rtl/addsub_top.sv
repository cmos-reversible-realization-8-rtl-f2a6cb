// addsub_top -- the two 8-bit adder/subtractors side by side.
//
// rev_*  : the reversible circuit, a cascade of WIDTH WG gates
//          (reversible_realization2). rev_m = 0 adds, 1 subtracts;
//          rev_c8 is the carry (add) or borrow (subtract) out and
//          rev_garbage the P/Q garbage outputs of the gates.
// conv_* : the conventional circuit, complement + multiplexer +
//          carry-lookahead adder (conv_addsub). conv_en = 0 adds, 1
//          subtracts; conv_cout is the adder's carry out (when subtracting,
//          1 means no borrow, the opposite sense of rev_c8).
// The two share no signals: each is brought out on its own ports so that
// they can be driven with the same operands and compared.
// Purely combinational.
module addsub_top #(
  parameter int unsigned WIDTH = addsub_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0]   rev_a,
  input  logic [WIDTH-1:0]   rev_b,
  input  logic               rev_m,
  output logic [WIDTH-1:0]   rev_s,
  output logic               rev_c8,
  output logic [2*WIDTH-1:0] rev_garbage,

  input  logic [WIDTH-1:0]   conv_a,
  input  logic [WIDTH-1:0]   conv_b,
  input  logic               conv_en,
  output logic [WIDTH-1:0]   conv_s,
  output logic               conv_cout
);

  reversible_realization2 #(.WIDTH(WIDTH)) u_rev (
    .a       (rev_a),
    .b       (rev_b),
    .m       (rev_m),
    .s       (rev_s),
    .c_out   (rev_c8),
    .garbage (rev_garbage)
  );

  conv_addsub #(.WIDTH(WIDTH)) u_conv (
    .a     (conv_a),
    .b     (conv_b),
    .en    (conv_en),
    .s     (conv_s),
    .c_out (conv_cout)
  );

endmodule
