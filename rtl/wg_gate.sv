// wg_gate -- 4x4 reversible WG gate.
//
// Outputs, as the gate is defined:
//   P = A
//   Q = A ^ B ^ D
//   R = A ^ B ^ C
//   S = (A ^ D ^ B) & (A ^ D ^ C) ^ (A ^ D)
// The map from {A,B,C,D} to {P,Q,R,S} is a bijection, so the inputs can be
// recovered from the outputs. S works out to the majority of (A^D), B and C:
// with D = 0 and C a carry, R and S are the sum and carry of a full adder;
// with D = 1 they are the difference and borrow of a full subtractor
// computing A - B - C. That is what makes one gate per bit enough for an
// adder/subtractor.
//
// Purely combinational; one gate has a quantum cost of 10.
module wg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic ad;

  always_comb begin
    ad = a ^ d;
    p  = a;
    q  = a ^ b ^ d;
    r  = a ^ b ^ c;
    s  = ((ad ^ b) & (ad ^ c)) ^ ad;
  end

endmodule
