// tb_reversible_realization2 -- exhaustive check of the 8-bit WG-gate
// adder/subtractor: every pair of operands in both modes.
// Expected values are integer arithmetic: m = 0 gives s = a + b and
// c_out = carry out; m = 1 gives s = a - b modulo 256 and c_out = borrow
// (1 when a < b). The garbage outputs are checked too: P of gate i is a[i]
// and Q is a[i]^b[i]^m. Also checks the worked example
// 10100010 + 11100011 = 1_10000101.
module tb_reversible_realization2;

  import addsub_pkg::*;

  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0]   a, b, s;
  logic               m, c_out;
  logic [2*WIDTH-1:0] garbage;
  int   checks = 0;
  int   failures = 0;

  reversible_realization2 #(.WIDTH(WIDTH)) dut (.a, .b, .m, .s, .c_out, .garbage);

  function automatic logic [2*WIDTH-1:0] exp_garbage(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y,
                                                     logic md);
    logic [2*WIDTH-1:0] g;
    for (int i = 0; i < WIDTH; i++) begin
      g[2*i]   = x[i];
      g[2*i+1] = x[i] ^ y[i] ^ md;
    end
    return g;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("tb_reversible_realization2: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'b1010_0010; b = 8'b1110_0011; m = MODE_ADD;
    #1;
    checks++;
    if ({c_out, s} != 9'b1_1000_0101) begin
      failures++;
      $display("FAIL example: got c_out=%b s=%b", c_out, s);
    end

    for (int md = 0; md < 2; md++)
      for (int x = 0; x < (1 << WIDTH); x++)
        for (int y = 0; y < (1 << WIDTH); y++) begin
          int exp_s;
          logic exp_c;
          a = WIDTH'(x);
          b = WIDTH'(y);
          m = md[0];
          #1;
          if (md == 0) begin
            exp_s = (x + y) % (1 << WIDTH);
            exp_c = (x + y) >= (1 << WIDTH);
          end else begin
            exp_s = (x - y + (1 << WIDTH)) % (1 << WIDTH);
            exp_c = x < y;
          end
          checks++;
          if (s != WIDTH'(exp_s) || c_out != exp_c) begin
            failures++;
            if (failures < 10)
              $display("FAIL m=%0d a=%0d b=%0d: got s=%0d c_out=%b expected s=%0d c_out=%b",
                       md, x, y, s, c_out, exp_s, exp_c);
          end
          checks++;
          if (garbage != exp_garbage(a, b, m)) begin
            failures++;
            if (failures < 10)
              $display("FAIL m=%0d a=%0d b=%0d: garbage=%h", md, x, y, garbage);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
