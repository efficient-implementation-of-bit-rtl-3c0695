// bs_adder: bit-slice two's complement adder. A W-bit word arrives as NDIG
// slices of D bits, least significant first, one slice per clock; the slice sum
// comes from a D-bit parallel prefix adder and the carry out is held in a
// flip-flop for the next slice. The slice flagged lsd starts a word with carry
// in 0, so the word sum wraps modulo 2^W, as a plain W-bit adder would.
// Interface: a, b and tag_i in; s and tag_o out, registered (latency 1 clock).
// The 2-bit slices and the prefix adder follow the source design; the
// slice order, the carry flip-flop and the tag are this design's choices.
module bs_adder
  import fft_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dig_t a,
  input  dig_t b,
  input  tag_t tag_i,
  output dig_t s,
  output tag_t tag_o
);

  logic c_q, cin, cout;
  dig_t sum;

  assign cin = tag_i.lsd ? 1'b0 : c_q;

  ppa_adder #(.WIDTH(D)) u_ppa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always_ff @(posedge clk) begin
    c_q <= cout;
    s   <= sum;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tag_o <= '0;
    else        tag_o <= tag_i;

endmodule
