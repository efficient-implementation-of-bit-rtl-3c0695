// tb_shuffle_block: writes frames of eight slices of eight random complex words
// (as 2-bit slices, least significant first) into the shuffling block, some
// frames back to back and some after idle clocks, and checks that output slice
// k of each frame holds point k of input slices 0..7 (the transposition), that
// each output frame starts FRAME clocks after its input frame, that sof and lsd
// mark the right clocks, and that no frame is lost.
module tb_shuffle_block;
  import fft_pkg::*;

  localparam int NF = 30;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  cdig_t xin [R], yout [R];
  tag_t  ti, to;

  shuffle_block dut (.clk, .rst_n, .x(xin), .tag_i(ti), .y(yout), .tag_o(to));

  cword_t exp_q [$];
  longint t_in_q [$];
  int     n_frames = 0;

  initial begin
    cword_t fr [R][R];
    ti = '0;
    for (int p = 0; p < R; p++) xin[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < R; i++)
        for (int p = 0; p < R; p++) begin
          fr[i][p].re = word_t'($urandom);
          fr[i][p].im = word_t'($urandom);
        end
      for (int k = 0; k < R; k++)
        for (int i = 0; i < R; i++) exp_q.push_back(fr[i][k]);
      for (int i = 0; i < R; i++)
        for (int d = 0; d < NDIG; d++) begin
          @(negedge clk);
          for (int p = 0; p < R; p++) begin
            xin[p].re = fr[i][p].re[d*D +: D];
            xin[p].im = fr[i][p].im[d*D +: D];
          end
          ti = '{valid: 1'b1, sof: (i == 0 && d == 0), lsd: (d == 0)};
          if (i == 0 && d == 0) t_in_q.push_back(cyc);
        end
      if (f % 4 == 3) begin
        @(negedge clk) ti = '0;
        repeat ($urandom_range(0, 20)) @(negedge clk);
      end
    end
    @(negedge clk) ti = '0;
    repeat (40) @(negedge clk);
    checks++;
    if (n_frames != NF) begin
      failures++;
      $display("FAIL %0d frames out of %0d", n_frames, NF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cword_t acc [R];
  int     oc = 0;   // clock within the output frame
  always @(posedge clk) if (rst_n && to.valid) begin
    if (to.sof) begin
      oc = 0;
      checks++;
      if (cyc - t_in_q.pop_front() != longint'(LAT_SHUF)) begin
        failures++;
        $display("FAIL frame latency at cycle %0d", cyc);
      end
    end
    checks++;
    if (to.lsd != (oc % NDIG == 0) || to.sof != (oc == 0)) begin
      failures++;
      $display("FAIL tag at output clock %0d", oc);
    end
    for (int o = 0; o < R; o++) begin
      acc[o].re[(oc % NDIG)*D +: D] = yout[o].re;
      acc[o].im[(oc % NDIG)*D +: D] = yout[o].im;
    end
    if (oc % NDIG == NDIG - 1)
      for (int o = 0; o < R; o++) begin
        cword_t ex;
        ex = exp_q.pop_front();
        checks++;
        if (acc[o] !== ex) begin
          failures++;
          $display("FAIL output slice %0d point %0d", oc / NDIG, o);
        end
      end
    oc++;
    if (oc == FRAME) n_frames++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
