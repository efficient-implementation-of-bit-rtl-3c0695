// bpu_top: bit-slice butterfly processing unit for a 64-point FFT.
// A 64-point frame x(0..63) of complex 4-bit samples enters as eight slices of
// eight points, slice i holding x(i), x(i+8), ..., x(i+56) (in_pt[m] = x(i+8m)),
// and every 4-bit real part as two 2-bit bit slices, least significant first.
// So one frame takes FRAME = 16 clocks: clock 2i carries the low slices of
// slice i, clock 2i+1 the high slices. in_sof marks the frame's first clock;
// in_valid must then stay high for the 16 clocks of the frame.
//
// Datapath (64 = 8 x 8 decomposition, decimation in frequency):
//   input register -> butterfly block 1 (eight-point DFT of each input slice)
//   -> twiddle factor block (slice i, point k times W64^(i*k))
//   -> shuffling block (8 x 8 transposition, double buffered)
//   -> butterfly block 2 (eight-point DFT of each transposed slice) -> outputs.
// Output slice k (k = 0..7) holds X(k), X(k+8), ..., X(k+56) in out_pt[0..7], in
// the same bit-slice format: out_valid, out_sof (first clock of a frame) and
// out_lsd (clock of the low slices) qualify it. Each arithmetic result keeps
// 4 bits and wraps on overflow, and each product keeps 4 bits of 8, so the
// output is the fixed-point result of that schedule, not an exact DFT.
// ALGO chooses the cells of both butterfly blocks: split-radix (the default),
// mixed-radix or radix-2; the rest of the unit is the same for all three.
// Latency lat_bpu(ALGO) = 1 + 2*lat_blk(ALGO) + LAT_TW + LAT_SHUF clocks from the
// first input clock of a frame to its first output clock (40 for split-radix,
// 38 for mixed-radix, 44 for radix-2); frames may follow back to back (one
// 64-point frame per 16 clocks).
// The block structure, the 8 x 8 slicing, the 4-bit data in 2-bit slices and
// the 16-clock frames follow the source design; the tag signals, the reset, the
// pipeline depth and the fixed-point formats are this design's choices.
module bpu_top
  import fft_pkg::*;
#(
  parameter algo_e ALGO = ALG_SPLIT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  cdig_t in_pt [R],
  output logic  out_valid,
  output logic  out_sof,
  output logic  out_lsd,
  output cdig_t out_pt [R]
);

  localparam int DW = (NDIG > 1) ? $clog2(NDIG) : 1;

  logic [DW-1:0] dig_q, dig;
  tag_t  t_in, t_b1, t_tw, t_sh, t_b2;
  cdig_t x_in [R], y_b1 [R], y_tw [R], y_sh [R];

  // Slice position within a word, restarted by in_sof.
  assign dig = in_sof ? '0 : dig_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dig_q <= '0;
      t_in  <= '0;
    end else begin
      if (in_valid) dig_q <= (dig == DW'(NDIG - 1)) ? '0 : DW'(dig + 1'b1);
      t_in.valid <= in_valid;
      t_in.sof   <= in_valid && in_sof;
      t_in.lsd   <= in_valid && (dig == '0);
    end

  always_ff @(posedge clk)
    x_in <= in_pt;

  bfly_block8 #(.ALGO(ALGO)) u_blk1 (.clk, .rst_n, .x(x_in), .tag_i(t_in), .y(y_b1), .tag_o(t_b1));
  twiddle_block u_tw   (.clk, .rst_n, .x(y_b1), .tag_i(t_b1), .y(y_tw), .tag_o(t_tw));
  shuffle_block u_shuf (.clk, .rst_n, .x(y_tw), .tag_i(t_tw), .y(y_sh), .tag_o(t_sh));
  bfly_block8 #(.ALGO(ALGO)) u_blk2 (.clk, .rst_n, .x(y_sh), .tag_i(t_sh), .y(out_pt), .tag_o(t_b2));

  assign out_valid = t_b2.valid;
  assign out_sof   = t_b2.sof;
  assign out_lsd   = t_b2.lsd;

endmodule
