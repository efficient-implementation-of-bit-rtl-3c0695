// twiddle_block: multiplies the output of the first butterfly block by the
// 64-point twiddle factors. For slice i (i = 0..7 in frame order) point k is
// multiplied by W64^(i*k) = exp(-j*2*pi*i*k/64). The slice number is counted
// from the tags: it restarts at 0 on the word flagged sof and steps at every
// following lsd. The twiddle words come from a constant table built at
// elaboration (8 x 8 entries, 4-bit parts with TWF fraction bits, rounded).
// Eight complex bit-slice multipliers; latency LAT_TW = LAT_CMUL clocks.
// The block itself follows the source design, which only names it; its
// contents and the twiddle format are this design's choices.
module twiddle_block
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cdig_t x [R],
  input  tag_t  tag_i,
  output cdig_t y [R],
  output tag_t  tag_o
);

  localparam int SW = $clog2(R);

  function automatic cword_t tw_entry(int i, int k);
    return tw64(i * k);
  endfunction

  logic [SW-1:0] slice_q, slice;
  tag_t          t_mul [R];

  always_comb begin
    if (tag_i.sof)      slice = '0;
    else if (tag_i.lsd) slice = slice_q + 1'b1;
    else                slice = slice_q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)           slice_q <= '0;
    else if (tag_i.valid) slice_q <= slice;

  for (genvar k = 0; k < R; k++) begin : g_mul
    cword_t w;
    always_comb begin
      w = tw_entry(0, k);
      for (int i = 0; i < R; i++)
        if (slice == SW'(i)) w = tw_entry(i, k);
    end
    bs_cmult u_cm (.clk, .rst_n, .a(x[k]), .w(w), .tag_i, .p(y[k]), .tag_o(t_mul[k]));
  end

  assign tag_o = t_mul[0];

endmodule
