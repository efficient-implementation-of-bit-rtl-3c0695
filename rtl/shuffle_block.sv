// shuffle_block: the transposition between the two butterfly blocks.
// The first block delivers slice i holding points (i, k) for k = 0..7; the second
// block needs slice k holding points (i, k) for i = 0..7. A frame is written
// slice by slice (FRAME = 8*NDIG clocks) into one of two banks of flip-flops
// while the other bank, holding the previous frame, is read out column by
// column; the banks swap at each frame end, so frames may follow back to back.
// Reading of a frame starts on the clock after its last slice was written and
// lasts FRAME clocks. Input frames must be FRAME valid clocks with no gap,
// starting with sof (checked by an assertion). Latency LAT_SHUF = FRAME clocks.
// The source design names a shuffling block between the two butterfly
// blocks; the double-buffered flip-flop transposer is this design's choice.
module shuffle_block
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cdig_t x [R],
  input  tag_t  tag_i,
  output cdig_t y [R],
  output tag_t  tag_o
);

  localparam int CW = $clog2(FRAME);
  localparam int SW = $clog2(R);
  localparam int DW = (NDIG > 1) ? $clog2(NDIG) : 1;

  // mem[bank][slice][point][digit]
  cdig_t mem [2][R][R][NDIG];

  logic [CW-1:0] wcnt_q, wcnt;
  logic          wbank_q;
  logic [CW-1:0] rcnt_q;
  logic          rbank_q, ract_q;
  logic [SW-1:0] wslice, rcol;
  logic [DW-1:0] wdig, rdig;

  assign wcnt   = tag_i.sof ? '0 : wcnt_q;
  assign wslice = SW'(wcnt / NDIG);
  assign wdig   = DW'(wcnt % NDIG);
  assign rcol   = SW'(rcnt_q / NDIG);
  assign rdig   = DW'(rcnt_q % NDIG);

  always_ff @(posedge clk)
    if (tag_i.valid)
      for (int p = 0; p < R; p++) mem[wbank_q][wslice][p][wdig] <= x[p];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wcnt_q  <= '0;
      wbank_q <= 1'b0;
      rcnt_q  <= '0;
      rbank_q <= 1'b0;
      ract_q  <= 1'b0;
    end else begin
      if (tag_i.valid) begin
        wcnt_q <= CW'(wcnt + 1'b1);
        if (wcnt == CW'(FRAME - 1)) begin
          wbank_q <= ~wbank_q;
          rbank_q <= wbank_q;
          ract_q  <= 1'b1;
          rcnt_q  <= '0;
        end
      end
      if (ract_q && !(tag_i.valid && wcnt == CW'(FRAME - 1))) begin
        rcnt_q <= CW'(rcnt_q + 1'b1);
        if (rcnt_q == CW'(FRAME - 1)) ract_q <= 1'b0;
      end
    end

  always_comb
    for (int i = 0; i < R; i++) y[i] = mem[rbank_q][i][rcol][rdig];

  assign tag_o.valid = ract_q;
  assign tag_o.sof   = ract_q && (rcnt_q == '0);
  assign tag_o.lsd   = ract_q && (rdig == '0);

  // A frame is written without gaps: once started, valid stays high to its end.
  a_no_gap: assert property (@(posedge clk) disable iff (!rst_n)
      (tag_i.valid && wcnt != CW'(FRAME - 1)) |=> tag_i.valid)
    else $error("shuffle_block: gap inside a frame");

endmodule
