// tb_conv_addsub -- exhaustive check of the conventional 8-bit
// adder/subtractor: every pair of operands in both modes. Expected values
// are integer arithmetic: en = 0 gives a + b (c_out the 9th bit);
// en = 1 gives a - b modulo 256 with c_out = 1 when a >= b.
// Also checks the worked example 10100010 + 11100011 = 1_10000101.
module tb_conv_addsub;

  import addsub_pkg::*;

  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0] a, b, s;
  logic             en, c_out;
  int   checks = 0;
  int   failures = 0;

  conv_addsub #(.WIDTH(WIDTH)) dut (.a, .b, .en, .s, .c_out);

  initial begin
    #1000000;
    failures++;
    $display("tb_conv_addsub: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'b1010_0010; b = 8'b1110_0011; en = MODE_ADD;
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
          a  = WIDTH'(x);
          b  = WIDTH'(y);
          en = md[0];
          #1;
          if (md == 0) begin
            exp_s = (x + y) % (1 << WIDTH);
            exp_c = (x + y) >= (1 << WIDTH);
          end else begin
            exp_s = (x - y + (1 << WIDTH)) % (1 << WIDTH);
            exp_c = x >= y;
          end
          checks++;
          if (s != WIDTH'(exp_s) || c_out != exp_c) begin
            failures++;
            if (failures < 10)
              $display("FAIL en=%0d a=%0d b=%0d: got s=%0d c_out=%b expected s=%0d c_out=%b",
                       md, x, y, s, c_out, exp_s, exp_c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
