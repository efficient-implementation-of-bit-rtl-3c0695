// bs_delay: N-clock delay line of WIDTH-bit flip-flops. It keeps the bit slices
// of a short path in step with those of a longer path (for example the sum
// outputs of a butterfly cell against its multiplied outputs). N = 0 is a wire.
// Delay flip-flops that keep the data of different paths in step follow the
// source design; their placement here is this design's choice.
module bs_delay #(
  parameter int N     = 1,
  parameter int WIDTH = 2 * fft_pkg::D
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [WIDTH-1:0] sr [N];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
    assign q = sr[N-1];
  end

endmodule
