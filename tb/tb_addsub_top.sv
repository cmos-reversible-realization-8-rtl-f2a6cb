// tb_addsub_top -- end-to-end test of both 8-bit adder/subtractors at their
// default size.
//
// Every pair of 8-bit operands is applied in both modes to the reversible
// and the conventional circuit at once. Each result is compared with
// integer arithmetic and the two circuits with each other: equal results,
// and carry/borrow flags of opposite sense when subtracting (the reversible
// circuit gives a borrow, the conventional one a carry). The example
// 10100010 + 11100011 = 1_10000101 is run first.
// Each mechanism must occur at least once, or it counts as a failure:
// addition, subtraction, carry out of an addition, borrow of a
// subtraction, zero result. The operands are also recovered from the
// reversible circuit's garbage outputs, as reversibility promises.
module tb_addsub_top;

  import addsub_pkg::*;

  localparam int unsigned WIDTH = DATA_WIDTH;

  logic [WIDTH-1:0]   rev_a, rev_b, rev_s;
  logic               rev_m, rev_c8;
  logic [2*WIDTH-1:0] rev_garbage;
  logic [WIDTH-1:0]   conv_a, conv_b, conv_s;
  logic               conv_en, conv_cout;

  int checks = 0;
  int failures = 0;
  int n_add = 0, n_sub = 0, n_carry = 0, n_borrow = 0, n_zero = 0;

  addsub_top dut (
    .rev_a, .rev_b, .rev_m, .rev_s, .rev_c8, .rev_garbage,
    .conv_a, .conv_b, .conv_en, .conv_s, .conv_cout
  );

  task automatic apply(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y,
                       input addsub_mode_e mode);
    int   exp_s;
    logic exp_carry;  // carry out when adding, borrow when subtracting
    rev_a  = x;  rev_b  = y;  rev_m   = mode;
    conv_a = x;  conv_b = y;  conv_en = mode;
    #1;
    if (mode == MODE_ADD) begin
      exp_s     = (int'(x) + int'(y)) % (1 << WIDTH);
      exp_carry = (int'(x) + int'(y)) >= (1 << WIDTH);
      n_add++;
    end else begin
      exp_s     = (int'(x) - int'(y) + (1 << WIDTH)) % (1 << WIDTH);
      exp_carry = x < y;
      n_sub++;
    end
    if (exp_carry && mode == MODE_ADD) n_carry++;
    if (exp_carry && mode == MODE_SUB) n_borrow++;
    if (exp_s == 0) n_zero++;

    checks++;
    if (rev_s != WIDTH'(exp_s) || rev_c8 != exp_carry) begin
      failures++;
      if (failures < 10)
        $display("FAIL reversible %s a=%0d b=%0d: s=%0d c8=%b expected s=%0d c8=%b",
                 mode.name(), x, y, rev_s, rev_c8, exp_s, exp_carry);
    end
    checks++;
    if (conv_s != WIDTH'(exp_s) ||
        conv_cout != (mode == MODE_ADD ? exp_carry : !exp_carry)) begin
      failures++;
      if (failures < 10)
        $display("FAIL conventional %s a=%0d b=%0d: s=%0d cout=%b expected s=%0d",
                 mode.name(), x, y, conv_s, conv_cout, exp_s);
    end
    // The inputs must be recoverable from the garbage outputs:
    // P of gate i is a[i], Q is a[i] ^ b[i] ^ m.
    begin
      logic [WIDTH-1:0] rec_a, rec_b;
      for (int i = 0; i < WIDTH; i++) begin
        rec_a[i] = rev_garbage[2*i];
        rec_b[i] = rev_garbage[2*i+1] ^ rev_garbage[2*i] ^ logic'(mode);
      end
      checks++;
      if (rec_a != x || rec_b != y) begin
        failures++;
        if (failures < 10)
          $display("FAIL garbage %s a=%0d b=%0d: recovered a=%0d b=%0d",
                   mode.name(), x, y, rec_a, rec_b);
      end
    end
    checks++;
    if (rev_s != conv_s || rev_c8 != (mode == MODE_ADD ? conv_cout : !conv_cout)) begin
      failures++;
      if (failures < 10)
        $display("FAIL circuits disagree %s a=%0d b=%0d", mode.name(), x, y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("tb_addsub_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(8'b1010_0010, 8'b1110_0011, MODE_ADD);
    checks++;
    if (rev_s != 8'b1000_0101 || !rev_c8) begin
      failures++;
      $display("FAIL example 10100010 + 11100011: got %b_%b", rev_c8, rev_s);
    end

    for (int md = 0; md < 2; md++)
      for (int x = 0; x < (1 << WIDTH); x++)
        for (int y = 0; y < (1 << WIDTH); y++)
          apply(WIDTH'(x), WIDTH'(y), md == 0 ? MODE_ADD : MODE_SUB);

    $display("mechanisms: add=%0d sub=%0d carry=%0d borrow=%0d zero=%0d",
             n_add, n_sub, n_carry, n_borrow, n_zero);
    checks++; if (n_add    == 0) begin failures++; $display("FAIL no addition");    end
    checks++; if (n_sub    == 0) begin failures++; $display("FAIL no subtraction"); end
    checks++; if (n_carry  == 0) begin failures++; $display("FAIL no carry out");   end
    checks++; if (n_borrow == 0) begin failures++; $display("FAIL no borrow");      end
    checks++; if (n_zero   == 0) begin failures++; $display("FAIL no zero result"); end

    $display("reversible circuit: %0d WG gates, quantum cost %0d, %0d garbage outputs",
             WIDTH, WIDTH * WG_QUANTUM_COST, 2 * WIDTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
