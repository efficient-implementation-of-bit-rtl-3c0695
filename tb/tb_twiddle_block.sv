// tb_twiddle_block: drives frames of eight-point slices of random complex 4-bit
// words through twiddle_block as 2-bit slices, least significant first, with sof on
// the first clock of each frame of eight slices, and compares every reassembled
// output slice with point k of slice i multiplied by W64^(i*k), computed by the word-level model.
// Besides random data it sends a fixed point 0 in the first frame. It checks the latency (LAT_TW
// clocks) of every slice and that no slice is lost.
module tb_twiddle_block;
  import fft_pkg::*;
  import fft_model_pkg::*;

  localparam int NF = 40;          // frames
  localparam int NW = NF * R;      // slices

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  cdig_t xin [R], yout [R];
  tag_t  ti, to;

  twiddle_block dut (.clk, .rst_n, .x(xin), .tag_i(ti), .y(yout), .tag_o(to));

  cword_t exp_q [$];
  longint t_in_q [$];
  int     n_out = 0;

  initial begin
    cvec8_t xi, e;
    ti = '0;
    for (int p = 0; p < R; p++) xin[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < R; i++) begin
        for (int p = 0; p < R; p++) begin
          xi[p].re = word_t'($urandom);
          xi[p].im = word_t'($urandom);
          if (f == 0 && p == 0) begin xi[p].re = word_t'(2); xi[p].im = word_t'(-3); end
        end
        for (int k = 0; k < R; k++) e[k] = c_mul(xi[k], m_tw(i * k, NPT));
        for (int p = 0; p < R; p++) exp_q.push_back(e[p]);
        for (int d = 0; d < NDIG; d++) begin
          @(negedge clk);
          for (int p = 0; p < R; p++) begin
            xin[p].re = xi[p].re[d*D +: D];
            xin[p].im = xi[p].im[d*D +: D];
          end
          ti = '{valid: 1'b1, sof: (i == 0 && d == 0), lsd: (d == 0)};
          if (d == 0) t_in_q.push_back(cyc);
        end
      end
      if (f % 3 == 2) begin
        @(negedge clk) ti = '0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
      end
    end
    @(negedge clk) ti = '0;
    repeat (30) @(negedge clk);
    checks++;
    if (n_out != NW) begin
      failures++;
      $display("FAIL %0d slices out of %0d", n_out, NW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cword_t acc [R];
  int     di;
  always @(posedge clk) if (rst_n && to.valid) begin
    if (to.lsd) begin
      di = 0;
      checks++;
      if (cyc - t_in_q.pop_front() != longint'(LAT_TW)) begin
        failures++;
        $display("FAIL latency at cycle %0d", cyc);
      end
    end
    for (int o = 0; o < R; o++) begin
      acc[o].re[di*D +: D] = yout[o].re;
      acc[o].im[di*D +: D] = yout[o].im;
    end
    di++;
    if (di == NDIG) begin
      n_out++;
      for (int o = 0; o < R; o++) begin
        cword_t ex;
        ex = exp_q.pop_front();
        checks++;
        if (acc[o] !== ex) begin
          failures++;
          $display("FAIL slice %0d point %0d: got (%0d,%0d) expected (%0d,%0d)",
                   n_out, o, acc[o].re, acc[o].im, ex.re, ex.im);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
