// operand_mux -- 2:1 word multiplexer choosing the adder's second operand.
//
// sel = 0 passes d0 (operand B, for addition); sel = 1 passes d1 (the
// complement of B, for subtraction). sel is the enable bit of the
// conventional adder/subtractor. Purely combinational.
module operand_mux #(
  parameter int unsigned WIDTH = addsub_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
