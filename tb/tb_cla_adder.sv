// tb_cla_adder -- exhaustive check of the 8-bit carry-lookahead adder:
// every pair of 8-bit addends with carry-in 0 and 1 (131,072 cases);
// {c_out, s} must equal the integer a + b + c_in. The adder's internal
// assertion also compares the lookahead carries with the full adders'.
module tb_cla_adder;

  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0] a, b, s;
  logic             c_in, c_out;
  int   checks = 0;
  int   failures = 0;

  cla_adder #(.WIDTH(WIDTH)) dut (.a, .b, .c_in, .s, .c_out);

  initial begin
    #1000000;
    failures++;
    $display("tb_cla_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < (1 << WIDTH); x++)
        for (int y = 0; y < (1 << WIDTH); y++) begin
          int total;
          a    = WIDTH'(x);
          b    = WIDTH'(y);
          c_in = ci[0];
          #1;
          total = x + y + ci;
          checks++;
          if ({c_out, s} != (WIDTH+1)'(total)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d: got c_out=%b s=%0d", x, y, ci, c_out, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
