// tb_complementer -- checks that b + b_n = 2^WIDTH - 1 for every 8-bit b,
// which holds exactly when b_n is the bitwise complement.
module tb_complementer;

  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0] b, b_n;
  int   checks = 0;
  int   failures = 0;

  complementer #(.WIDTH(WIDTH)) dut (.b, .b_n);

  initial begin
    #100000;
    failures++;
    $display("tb_complementer: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << WIDTH); v++) begin
      b = WIDTH'(v);
      #1;
      checks++;
      if (int'(b) + int'(b_n) != (1 << WIDTH) - 1 || (b & b_n) != '0) begin
        failures++;
        $display("FAIL b=%b b_n=%b", b, b_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
