// bs_subtractor: bit-slice two's complement subtractor computing a - b as
// a + ~b + 1. Slices of D bits arrive least significant first, one per clock;
// the inverted subtrahend slice goes through a D-bit parallel prefix adder whose
// carry in is 1 on the slice flagged lsd and the stored carry on later slices.
// Interface: a, b and tag_i in; s and tag_o out, registered (latency 1 clock).
// A subtractor per butterfly follows the source design; building it as
// a + ~b + 1 on the same prefix adder is this design's choice.
module bs_subtractor
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

  assign cin = tag_i.lsd ? 1'b1 : c_q;

  ppa_adder #(.WIDTH(D)) u_ppa (.a(a), .b(~b), .cin(cin), .sum(sum), .cout(cout));

  always_ff @(posedge clk) begin
    c_q <= cout;
    s   <= sum;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tag_o <= '0;
    else        tag_o <= tag_i;

endmodule
