// bs_mult: bit-slice multiplier of a data word by a twiddle component.
// The data word arrives as NDIG slices of D bits, least significant first, and
// is gathered in a shift register. With its last slice the full W x W signed
// product is formed and only W bits of it are kept: bits [TWF+W-1:TWF], the
// bits at the data's own scale, which for a twiddle of magnitude at most 1 are
// the most significant bits that are not sign extension (the rest is truncated).
// The kept word is then sent out again slice by slice, least significant first.
// Interface: a (slice) and tag_i in, w (whole twiddle word, sampled together
// with the last slice); p (slice) and tag_o out. Latency NDIG clocks, one word
// per NDIG clocks, back to back.
// Keeping four bits of each product follows the source design; which bits
// are kept, truncation, and the gather-multiply-shift structure are this
// design's choices.
module bs_mult
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  dig_t  a,
  input  word_t w,
  input  tag_t  tag_i,
  output dig_t  p,
  output tag_t  tag_o
);

  localparam int IW = (NDIG > 1) ? $clog2(NDIG) : 1;

  logic [IW-1:0]     idx_q, idx;
  logic [W-1:0]      acc_q, full;
  logic [W-1:0]      sh_q;
  logic signed [2*W-1:0] prod;
  tag_t              tag_d [NDIG];

  assign idx  = tag_i.lsd ? '0 : IW'(idx_q + 1'b1);
  assign full = {a, acc_q[W-1:D]};
  assign prod = $signed(full) * w;
  assign p    = sh_q[D-1:0];

  always_ff @(posedge clk) begin
    idx_q <= idx;
    acc_q <= full;
    if (idx == IW'(NDIG - 1)) sh_q <= prod[TWF+W-1:TWF];
    else                      sh_q <= sh_q >> D;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NDIG; i++) tag_d[i] <= '0;
    end else begin
      tag_d[0] <= tag_i;
      for (int i = 1; i < NDIG; i++) tag_d[i] <= tag_d[i-1];
    end

  assign tag_o = tag_d[NDIG-1];

endmodule
