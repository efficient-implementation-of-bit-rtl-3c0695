// r2_cell: radix-2 decimation-in-frequency butterfly calculating cell.
//   y0 = a + b,   y1 = (a - b) * w
// Two complex points and one twiddle factor in; four bit-slice multipliers,
// three bit-slice adders and three bit-slice subtractors, as the cell is
// described. The y0 path is delayed with flip-flops so that both outputs leave
// together, LAT_R2 = LAT_ADD + LAT_CMUL clocks after the inputs. One complex
// word pair per NDIG clocks, continuously.
// The cell's function and its unit counts follow the source design; the
// pipelining is this design's choice.
// The twiddle inputs are sampled when a word reaches the multipliers, LAT_ADD
// clocks after it entered, so they must be held while words pass (inside
// the eight-point blocks they are constants).
module r2_cell
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cdig_t  a,
  input  cdig_t  b,
  input  cword_t w,
  input  tag_t   tag_i,
  output cdig_t  y0,
  output cdig_t  y1,
  output tag_t   tag_o
);

  cdig_t s, d;
  tag_t  t_s, t_d;

  bs_caddsub #(.SUB_RE(1'b0), .SUB_IM(1'b0), .SWAP_B(1'b0)) u_add
    (.clk, .rst_n, .a(a), .b(b), .tag_i, .s(s), .tag_o(t_s));
  bs_caddsub #(.SUB_RE(1'b1), .SUB_IM(1'b1), .SWAP_B(1'b0)) u_sub
    (.clk, .rst_n, .a(a), .b(b), .tag_i, .s(d), .tag_o(t_d));

  bs_cmult u_mul (.clk, .rst_n, .a(d), .w(w), .tag_i(t_d), .p(y1), .tag_o(tag_o));

  bs_delay #(.N(LAT_CMUL), .WIDTH($bits(cdig_t))) u_dly (.clk, .d(s), .q(y0));

endmodule
