// aoi_full_adder -- 1-bit full adder in AND-OR-Invert form.
//
//   w0..w2 = a&b, a&c_in, b&c_in      w3 = NOR(w0, w1, w2)   c_out = ~w3
//   w4 = a | b | c_in                 w5 = w3 & w4
//   w6 = a & b & c_in                 w7 = NOR(w5, w6)       s     = ~w7
// w3 is low when at least two inputs are high, so c_out is the majority.
// w5 is high when exactly one input is high, w6 when all three are, so
// s = w5 | w6 is the parity of the three inputs.
//
// The gate types and net names w0..w7 follow the AOI full adder the design
// uses; which inputs feed each of the first three AND gates is this
// design's choice, the only one that yields a full adder.
// Purely combinational.
module aoi_full_adder (
  input  logic a,
  input  logic b,
  input  logic c_in,
  output logic s,
  output logic c_out
);

  logic w0, w1, w2, w3, w4, w5, w6, w7;

  always_comb begin
    w0    = a & b;
    w1    = a & c_in;
    w2    = b & c_in;
    w3    = ~(w0 | w1 | w2);
    c_out = ~w3;
    w4    = a | b | c_in;
    w5    = w3 & w4;
    w6    = a & b & c_in;
    w7    = ~(w5 | w6);
    s     = ~w7;
  end

endmodule
