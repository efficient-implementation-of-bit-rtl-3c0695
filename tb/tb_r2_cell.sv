// tb_r2_cell: drives random complex 4-bit words through r2_cell as 2-bit
// slices, least significant first, one word after another with occasional idle
// clocks, and compares every reassembled output word with y0 = a + b and y1 = (a - b) * w,
// computed by the word-level model. Twiddle inputs are random and change only
// between batches of words, while the pipeline is empty. It also checks the
// latency (LAT_R2 clocks) of every word and that no word is lost.
module tb_r2_cell;
  import fft_pkg::*;
  import fft_model_pkg::*;

  localparam int NI = 2, NT = 1, NO = 2;
  localparam int NW = 300;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  cdig_t  xin [NI];
  cword_t tw [NT];
  cdig_t  yout [NO];
  tag_t   ti, to;

  r2_cell dut (
    .clk, .rst_n,
    .a(xin[0]),
    .b(xin[1]),
    .w(tw[0]),
    .tag_i(ti),
    .y0(yout[0]),
    .y1(yout[1]),
    .tag_o(to)
  );

  cword_t exp_q [$];
  longint t_in_q [$];
  int     n_out = 0;

  function automatic cword_t rnd_cw();
    cword_t c;
    c.re = word_t'($urandom);
    c.im = word_t'($urandom);
    return c;
  endfunction

  initial begin
    cword_t xi [NI];
    cword_t e [NO];
    ti = '0;
    for (int p = 0; p < NI; p++) xin[p] = '0;
    for (int t = 0; t < NT; t++) tw[t] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NW; n++) begin
      if (n % 25 == 0) begin
        @(negedge clk) ti = '0;
        repeat (12) @(negedge clk);
        for (int t = 0; t < NT; t++) tw[t] = (n == 0) ? m_tw(0, 8) : rnd_cw();
      end
      for (int p = 0; p < NI; p++) xi[p] = rnd_cw();
      m_r2(xi[0], xi[1], tw[0], e[0], e[1]);
      for (int o = 0; o < NO; o++) exp_q.push_back(e[o]);
      for (int d = 0; d < NDIG; d++) begin
        @(negedge clk);
        for (int p = 0; p < NI; p++) begin
          xin[p].re = xi[p].re[d*D +: D];
          xin[p].im = xi[p].im[d*D +: D];
        end
        ti = '{valid: 1'b1, sof: 1'b0, lsd: (d == 0)};
        if (d == 0) t_in_q.push_back(cyc);
      end
      if ($urandom_range(0, 4) == 0) @(negedge clk) ti = '0;
    end
    @(negedge clk) ti = '0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != NW) begin
      failures++;
      $display("FAIL %0d words out of %0d", n_out, NW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cword_t acc [NO];
  int     di;
  always @(posedge clk) if (rst_n && to.valid) begin
    if (to.lsd) begin
      di = 0;
      checks++;
      if (cyc - t_in_q.pop_front() != longint'(LAT_R2)) begin
        failures++;
        $display("FAIL latency at cycle %0d", cyc);
      end
    end
    for (int o = 0; o < NO; o++) begin
      acc[o].re[di*D +: D] = yout[o].re;
      acc[o].im[di*D +: D] = yout[o].im;
    end
    di++;
    if (di == NDIG) begin
      n_out++;
      for (int o = 0; o < NO; o++) begin
        cword_t ex;
        ex = exp_q.pop_front();
        checks++;
        if (acc[o] !== ex) begin
          failures++;
          $display("FAIL word %0d output %0d: got (%0d,%0d) expected (%0d,%0d)",
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
