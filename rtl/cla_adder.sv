// cla_adder -- WIDTH-bit carry-lookahead adder.
//
// Each bit forms generate g[i] = a[i] & b[i] and propagate p[i] = a[i] ^ b[i].
// Every carry is computed in one level straight from these and c_in:
//   c[i+1] = g[i] | p[i]&g[i-1] | ... | p[i]&...&p[0]&c_in
// so no carry waits on another. Each sum bit comes from an AND-OR-Invert
// full adder fed with a[i], b[i] and the lookahead carry c[i]; the full
// adder's own carry output must equal c[i+1], which an assertion checks.
//
// The carry-lookahead organisation and the AOI full adder follow the
// design; the single-level lookahead over all WIDTH bits is this design's
// choice. Purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = addsub_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  output logic [WIDTH-1:0] s,
  output logic             c_out
);

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] fa_cout;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c = '0;
    c[0] = c_in;
    for (int i = 0; i < WIDTH; i++) begin
      logic term;
      // Term with the carry-in: p[i] & ... & p[0] & c_in.
      term = c_in;
      for (int k = 0; k <= i; k++) term &= p[k];
      c[i+1] = term;
      // Terms g[j] & p[i] & ... & p[j+1] for j = 0..i.
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term &= p[k];
        c[i+1] |= term;
      end
    end
  end

  assign c_out = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    aoi_full_adder u_fa (
      .a     (a[i]),
      .b     (b[i]),
      .c_in  (c[i]),
      .s     (s[i]),
      .c_out (fa_cout[i])
    );
  end

  // The ripple carry of each full adder and the lookahead carry must agree.
  always_comb begin
    assert (fa_cout == c[WIDTH:1])
      else $error("cla_adder: lookahead carry %b differs from full-adder carry %b",
                  c[WIDTH:1], fa_cout);
  end

endmodule
