// bfly_block8: eight-point DIF butterfly calculating block.
// x[n] in, natural order n = 0..7; y[k] = DFT8(x)[k] out, natural order, in the
// 4-bit fixed-point arithmetic of the cells. ALGO selects the cells:
//
// ALG_SPLIT (default, split-radix):
//   stage 1: two split-radix cells on (x[n], x[n+2], x[n+4], x[n+6]), n = 0, 1,
//            twiddles W8^n and W8^3n; their sums u[0..3] feed the even outputs,
//            their products z1[n], z3[n] the outputs 4k+1 and 4k+3;
//   stage 2: a radix-4 cell (twiddles 1) gives y[0], y[2], y[4], y[6] from u;
//            two radix-2 cells (twiddle 1) give y[1], y[5] from z1 and y[3], y[7]
//            from z3, padded by LAT_R4 - LAT_R2 clocks of flip-flops.
// ALG_MIXED (mixed-radix: radix 2, then radix 4):
//   stage 1: four radix-2 cells on (x[n], x[n+4]), twiddle W8^n;
//   stage 2: two radix-4 cells (twiddles 1), on the sums for the even outputs
//            and on the twiddled differences for the odd outputs.
// ALG_RADIX2 (three ranks of four radix-2 cells, twelve cells):
//   ranks with twiddles W8^n, W4^m and 1; the bit-reversed result is put back
//   in natural order by wiring.
// Every multiplier is kept even where its twiddle is 1, so the block is the
// hardware the cells describe; a synthesis tool folds the trivial ones.
// Latency lat_blk(ALGO) clocks (10, 9 and 12), one eight-point slice per NDIG
// clocks, continuously.
// The cell counts of the mixed-radix and radix-2 blocks follow the source
// design; the arrangement of the cells is the textbook DIF one, chosen here.
module bfly_block8
  import fft_pkg::*;
#(
  parameter algo_e ALGO = ALG_SPLIT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cdig_t x [R],
  input  tag_t  tag_i,
  output cdig_t y [R],
  output tag_t  tag_o
);

  localparam cword_t ONE = twiddle(0, 8);

  if (ALGO == ALG_MIXED) begin : g_mixed
    cdig_t a [R];
    tag_t  t1 [4];
    tag_t  t_odd;
    for (genvar n = 0; n < 4; n++) begin : g_r2
      r2_cell u_r2 (.clk, .rst_n, .a(x[n]), .b(x[n+4]), .w(twiddle(n, 8)), .tag_i,
                    .y0(a[n]), .y1(a[n+4]), .tag_o(t1[n]));
    end
    r4_cell u_r4e (.clk, .rst_n, .a(a[0]), .b(a[1]), .c(a[2]), .d(a[3]),
                   .w1(ONE), .w2(ONE), .w3(ONE), .tag_i(t1[0]),
                   .y0(y[0]), .y1(y[2]), .y2(y[4]), .y3(y[6]), .tag_o(tag_o));
    r4_cell u_r4o (.clk, .rst_n, .a(a[4]), .b(a[5]), .c(a[6]), .d(a[7]),
                   .w1(ONE), .w2(ONE), .w3(ONE), .tag_i(t1[0]),
                   .y0(y[1]), .y1(y[3]), .y2(y[5]), .y3(y[7]), .tag_o(t_odd));

  end else if (ALGO == ALG_RADIX2) begin : g_radix2
    cdig_t a [R], b [R], c [R];
    tag_t  ta [4], tb [4], tc [4];
    // rank 1: spans of 4, twiddle W8^n
    for (genvar n = 0; n < 4; n++) begin : g_rank1
      r2_cell u_r2 (.clk, .rst_n, .a(x[n]), .b(x[n+4]), .w(twiddle(n, 8)), .tag_i,
                    .y0(a[n]), .y1(a[n+4]), .tag_o(ta[n]));
    end
    // rank 2: spans of 2 inside each half, twiddle W4^m
    for (genvar h = 0; h < 2; h++) begin : g_rank2
      for (genvar m = 0; m < 2; m++) begin : g_cell
        r2_cell u_r2 (.clk, .rst_n, .a(a[4*h+m]), .b(a[4*h+m+2]), .w(twiddle(m, 4)),
                      .tag_i(ta[0]), .y0(b[4*h+m]), .y1(b[4*h+m+2]), .tag_o(tb[2*h+m]));
      end
    end
    // rank 3: neighbours, twiddle 1
    for (genvar q = 0; q < 4; q++) begin : g_rank3
      r2_cell u_r2 (.clk, .rst_n, .a(b[2*q]), .b(b[2*q+1]), .w(ONE), .tag_i(tb[0]),
                    .y0(c[2*q]), .y1(c[2*q+1]), .tag_o(tc[q]));
    end
    // c[i] holds bin bitrev3(i)
    for (genvar i = 0; i < R; i++) begin : g_unscramble
      localparam int BR = ((i & 1) << 2) | (i & 2) | ((i >> 2) & 1);
      assign y[BR] = c[i];
    end
    assign tag_o = tc[0];

  end else begin : g_split
    localparam int PAD = LAT_R4 - LAT_R2;
    cdig_t u [4];
    cdig_t z1 [2], z3 [2];
    tag_t  t_sr [2];
    cdig_t y1p, y5p, y3p, y7p;
    tag_t  t_r2a, t_r2b;

    for (genvar n = 0; n < 2; n++) begin : g_sr
      sr_cell u_sr (
        .clk, .rst_n,
        .a(x[n]), .b(x[n+2]), .c(x[n+4]), .d(x[n+6]),
        .w1(twiddle(n, 8)), .w3(twiddle(3*n, 8)),
        .tag_i,
        .u0(u[n]), .u1(u[n+2]), .z1(z1[n]), .z3(z3[n]),
        .tag_o(t_sr[n])
      );
    end

    r4_cell u_r4 (
      .clk, .rst_n,
      .a(u[0]), .b(u[1]), .c(u[2]), .d(u[3]),
      .w1(ONE), .w2(ONE), .w3(ONE),
      .tag_i(t_sr[0]),
      .y0(y[0]), .y1(y[2]), .y2(y[4]), .y3(y[6]),
      .tag_o(tag_o)
    );

    r2_cell u_r2a (.clk, .rst_n, .a(z1[0]), .b(z1[1]), .w(ONE), .tag_i(t_sr[0]),
                   .y0(y1p), .y1(y5p), .tag_o(t_r2a));
    r2_cell u_r2b (.clk, .rst_n, .a(z3[0]), .b(z3[1]), .w(ONE), .tag_i(t_sr[0]),
                   .y0(y3p), .y1(y7p), .tag_o(t_r2b));

    bs_delay #(.N(PAD), .WIDTH($bits(cdig_t))) u_p1 (.clk, .d(y1p), .q(y[1]));
    bs_delay #(.N(PAD), .WIDTH($bits(cdig_t))) u_p5 (.clk, .d(y5p), .q(y[5]));
    bs_delay #(.N(PAD), .WIDTH($bits(cdig_t))) u_p3 (.clk, .d(y3p), .q(y[3]));
    bs_delay #(.N(PAD), .WIDTH($bits(cdig_t))) u_p7 (.clk, .d(y7p), .q(y[7]));
  end

endmodule
