// ppa_adder: WIDTH-bit parallel prefix (Kogge-Stone) adder with carry in and out.
//
// Each bit forms a carry generate g = a & b and a carry propagate p = a ^ b; the
// carry into bit i+1 is G(i:0) + P(i:0)*cin, built in log2(WIDTH) prefix levels
// of the operator (G, P) o (G', P') = (G + P*G', P*P'). The sum bit is
// s_i = p_i ^ c_i and c_{i+1} = g_i + p_i*c_i, as in a carry look-ahead adder.
// The carry in is folded into bit 0's generate. Purely combinational.
// The width defaults to one bit slice (2 bits); the Kogge-Stone tree is this
// design's choice of prefix network.
module ppa_adder #(
  parameter int WIDTH = fft_pkg::D
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] g, p, gg, pp, gn, pn;
  logic [WIDTH:0]   c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    // group (generate, propagate) of bits i..0, carry in included at bit 0
    gg = g;
    pp = p;
    gg[0] = g[0] | (p[0] & cin);
    for (int d = 1; d < WIDTH; d = d * 2) begin
      gn = gg;
      pn = pp;
      for (int i = d; i < WIDTH; i++) begin
        gn[i] = gg[i] | (pp[i] & gg[i-d]);
        pn[i] = pp[i] & pp[i-d];
      end
      gg = gn;
      pp = pn;
    end
    c[0] = cin;
    for (int i = 0; i < WIDTH; i++) c[i+1] = gg[i];
    sum  = p ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end

endmodule
