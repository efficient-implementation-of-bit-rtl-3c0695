// tb_bpu_top_mixed: end-to-end test of the 64-point bit-slice butterfly processing
// unit with ALGO = ALG_MIXED (the other sizes at their defaults). Each frame of 64 complex 4-bit samples is sent as
// eight slices x(i), x(i+8), ..., x(i+56), each word as two 2-bit slices, least
// significant first (16 clocks per frame). Output slice k must hold X(k),
// X(k+8), ..., X(k+56) as computed by the word-level model of the same
// fixed-point schedule. Frame 0 is an impulse and frame 1 a constant, whose
// exact DFTs (modulo 16 for the constant) the output must also equal. Frames are sent both back to back
// (the shuffling block then writes one bank while it reads the other) and
// after idle gaps; the test counts how often each happened and fails if one
// never did. It also checks the latency of every frame (lat_bpu(ALG_MIXED) clocks from the
// first input clock to the first output clock) and the 16-clock output frame.
module tb_bpu_top_mixed;
  import fft_pkg::*;
  import fft_model_pkg::*;

  localparam int NF = 24;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic  in_valid, in_sof, out_valid, out_sof, out_lsd;
  cdig_t in_pt [R], out_pt [R];

  bpu_top #(.ALGO(ALG_MIXED)) dut (.clk, .rst_n, .in_valid, .in_sof, .in_pt, .out_valid, .out_sof,
               .out_lsd, .out_pt);

  cword_t exp_q [$];
  longint t_in_q [$];
  int     n_frames = 0, n_b2b = 0, n_gap = 0, n_exact = 0;

  initial begin
    cvec64_t x, X;
    bit gap;
    in_valid = 1'b0; in_sof = 1'b0;
    for (int p = 0; p < R; p++) in_pt[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gap = 1'b1;
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < NPT; n++) begin
        x[n].re = word_t'($urandom);
        x[n].im = word_t'($urandom);
        if (f == 0) begin x[n].re = (n == 0) ? word_t'(-3) : '0; x[n].im = (n == 0) ? word_t'(2) : '0; end
        if (f == 1) begin x[n].re = word_t'(1); x[n].im = word_t'(-1); end
      end
      X = m_fft64(x, ALG_MIXED);
      if (f == 0) begin
        // impulse: every bin equals the sample
        for (int k = 0; k < NPT; k++) begin
          checks++;
          if (X[k].re !== word_t'(-3) || X[k].im !== word_t'(2)) begin
            failures++; $display("FAIL model impulse bin %0d", k);
          end
        end
        n_exact++;
      end
      if (f == 1) begin
        // constant frame: exact DFT is 64*(1-j) at bin 0, which is 0 modulo 16, and 0 elsewhere
        for (int k = 0; k < NPT; k++) begin
          checks++;
          if (X[k] !== '0) begin failures++; $display("FAIL model constant bin %0d", k); end
        end
        n_exact++;
      end
      for (int k = 0; k < R; k++)
        for (int m = 0; m < R; m++) exp_q.push_back(X[k + 8*m]);
      if (gap) n_gap++; else n_b2b++;
      for (int i = 0; i < R; i++)
        for (int d = 0; d < NDIG; d++) begin
          @(negedge clk);
          for (int m = 0; m < R; m++) begin
            in_pt[m].re = x[i + 8*m].re[d*D +: D];
            in_pt[m].im = x[i + 8*m].im[d*D +: D];
          end
          in_valid = 1'b1;
          in_sof   = (i == 0 && d == 0);
          if (in_sof) t_in_q.push_back(cyc);
        end
      gap = (f % 3 == 2);
      if (gap) begin
        @(negedge clk) begin in_valid = 1'b0; in_sof = 1'b0; end
        repeat ($urandom_range(0, 30)) @(negedge clk);
      end
    end
    @(negedge clk) begin in_valid = 1'b0; in_sof = 1'b0; end
    repeat (lat_bpu(ALG_MIXED) + FRAME + 10) @(negedge clk);
    checks += 4;
    if (n_frames != NF) begin failures++; $display("FAIL %0d frames out of %0d", n_frames, NF); end
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back frame"); end
    if (n_gap == 0) begin failures++; $display("FAIL no frame after a gap"); end
    if (n_exact != 2) begin failures++; $display("FAIL exact-DFT frames not run"); end
    $display("frames=%0d back_to_back=%0d after_gap=%0d exact=%0d latency=%0d clocks",
             n_frames, n_b2b, n_gap, n_exact, lat_bpu(ALG_MIXED));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cword_t acc [R];
  int     oc = 0;

  // An output frame is FRAME consecutive valid clocks.
  always @(posedge clk) if (rst_n && !out_valid && oc != 0 && oc != FRAME) begin
    failures++;
    $display("FAIL output frame interrupted after %0d clocks", oc);
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_sof) begin
      oc = 0;
      checks++;
      if (cyc - t_in_q.pop_front() != longint'(lat_bpu(ALG_MIXED))) begin
        failures++;
        $display("FAIL frame latency at cycle %0d", cyc);
      end
    end
    checks++;
    if (out_lsd != (oc % NDIG == 0) || oc >= FRAME) begin
      failures++; $display("FAIL out_lsd or frame length");
    end
    for (int o = 0; o < R; o++) begin
      acc[o].re[(oc % NDIG)*D +: D] = out_pt[o].re;
      acc[o].im[(oc % NDIG)*D +: D] = out_pt[o].im;
    end
    if (oc % NDIG == NDIG - 1)
      for (int o = 0; o < R; o++) begin
        cword_t ex;
        ex = exp_q.pop_front();
        checks++;
        if (acc[o] !== ex) begin
          failures++;
          $display("FAIL frame %0d X(%0d): got (%0d,%0d) expected (%0d,%0d)", n_frames,
                   oc / NDIG + 8*o, acc[o].re, acc[o].im, ex.re, ex.im);
        end
      end
    oc++;
    if (oc == FRAME) n_frames++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
