// addsub_pkg -- constants and types shared by the 8-bit adder/subtractors.
//
// DATA_WIDTH is the operand width of both circuits (8 bits, as the design
// is specified). addsub_mode_e names the meaning of the mode / enable bit
// that both circuits take: 0 selects A+B, 1 selects A-B.
// WG_QUANTUM_COST is the quantum cost of one WG gate (10), used to work out
// the cost of a cascade of them.
package addsub_pkg;

  localparam int unsigned DATA_WIDTH = 8;

  localparam int unsigned WG_QUANTUM_COST = 10;

  typedef enum logic {
    MODE_ADD = 1'b0,
    MODE_SUB = 1'b1
  } addsub_mode_e;

endpackage
