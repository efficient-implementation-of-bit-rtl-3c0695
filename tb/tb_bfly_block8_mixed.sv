// tb_bfly_block8_mixed: the eight-point block built with ALGO = ALG_MIXED. Drives frames of eight-point slices of random complex 4-bit
// words through bfly_block8 as 2-bit slices, least significant first, with sof on
// the first clock of each frame of eight slices, and compares every reassembled
// output slice with the eight-point DFT of the slice built from the same cells (fixed-point, natural order), computed by the word-level model.
// Besides random data it sends impulses and constants, and checks that the model gives their exact DFT. It checks the latency (lat_blk(ALG_MIXED)
// clocks) of every slice and that no slice is lost.
module tb_bfly_block8_mixed;
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

  bfly_block8 #(.ALGO(ALG_MIXED)) dut (.clk, .rst_n, .x(xin), .tag_i(ti), .y(yout), .tag_o(to));

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
          // frame 0: impulses and constants, whose exact DFT the block must give
          if (f == 0) begin
            xi[p].re = (i == 0) ? word_t'((p == 0) ? 3 : 0) :
                       (i == 1) ? word_t'(1) : (i == 2) ? word_t'((p == 0) ? -5 : 0) : xi[p].re;
            xi[p].im = (i < 3) ? word_t'(0) : xi[p].im;
          end
        end
        e = m_blk8(xi, ALG_MIXED);
        if (f == 0 && i < 3)
          for (int k = 0; k < R; k++) begin
            // exact DFT: impulse -> flat spectrum, constant 1 -> 8 at bin 0
            cword_t ex;
            ex.re = (i == 0) ? word_t'(3) : (i == 1) ? word_t'((k == 0) ? 8 : 0) : word_t'(-5);
            ex.im = '0;
            checks++;
            if (e[k] !== ex) begin failures++; $display("FAIL exact DFT slice %0d bin %0d", i, k); end
          end
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
      if (cyc - t_in_q.pop_front() != longint'(lat_blk(ALG_MIXED))) begin
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
