// tb_operand_mux -- drives random words on both data inputs with sel low
// and high and checks that the selected one appears on y.
module tb_operand_mux;

  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0] d0, d1, y;
  logic             sel;
  int   checks = 0;
  int   failures = 0;

  operand_mux #(.WIDTH(WIDTH)) dut (.d0, .d1, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("tb_operand_mux: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [WIDTH-1:0] exp_y;
      d0  = WIDTH'($urandom);
      d1  = WIDTH'($urandom);
      sel = n[0];
      #1;
      exp_y = (n % 2 == 0) ? d0 : d1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h: y=%h expected %h", sel, d0, d1, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
