// tb_wg_gate -- exhaustive check of the 4x4 WG gate.
//
// Applies all 16 input combinations, compares P, Q, R, S with the gate's
// equations written out independently (S as the majority of A^D, B, C), and
// checks that no two inputs give the same output, i.e. that the gate is
// reversible. A watchdog ends the run if it stalls.
module tb_wg_gate;

  logic a, b, c, d;
  logic p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  bit   seen [16];

  wg_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin
    #10000;
    failures++;
    $display("tb_wg_gate: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      logic x;
      logic [3:0] exp_out, out;
      {a, b, c, d} = 4'(v);
      #1;
      x = a ^ d;
      // Majority of x, b, c.
      exp_out = {a, a ^ b ^ d, a ^ b ^ c, (x & b) | (x & c) | (b & c)};
      out     = {p, q, r, s};
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL abcd=%b: pqrs=%b expected %b", 4'(v), out, exp_out);
      end
      checks++;
      if (seen[out]) begin
        failures++;
        $display("FAIL abcd=%b: output %b repeats, gate not reversible", 4'(v), out);
      end
      seen[out] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
