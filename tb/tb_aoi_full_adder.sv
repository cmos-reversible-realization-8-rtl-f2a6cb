// tb_aoi_full_adder -- exhaustive check of the AOI full adder: for all eight
// input combinations, {c_out, s} must equal the integer a + b + c_in.
module tb_aoi_full_adder;

  logic a, b, c_in, s, c_out;
  int   checks = 0;
  int   failures = 0;

  aoi_full_adder dut (.a, .b, .c_in, .s, .c_out);

  initial begin
    #10000;
    failures++;
    $display("tb_aoi_full_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c_in} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c_in);
      checks++;
      if ({c_out, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%b b=%b c_in=%b: c_out,s=%b%b expected %0d",
                 a, b, c_in, c_out, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
