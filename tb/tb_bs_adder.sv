// tb_bs_adder: drives random 4-bit words through bs_adder as 2-bit slices, least
// significant first, with random idle clocks between words, reassembles the
// output slices and compares each word with a + b (wrapping at 4 bits) computed
// by the word-level model. It also checks the latency of every word (LSD in to
// LSD out) against LAT_ADD clocks and that no word is lost.
module tb_bs_adder;
  import fft_pkg::*;
  import fft_model_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dig_t  a, b, y;
  tag_t  ti, to;
  word_t wb_q [1];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bs_adder dut (.clk, .rst_n, .a(a), .b(b), .tag_i(ti), .s(y), .tag_o(to));

  word_t  exp_q [$];
  longint t_in_q [$];
  int     n_out = 0;
  localparam int NW = 400;

  initial begin
    word_t wa, wb;
    ti = '0; a = '0; b = '0; wb_q[0] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NW; n++) begin
      wa = word_t'($urandom); wb = word_t'($urandom);
      if (n == 0) begin wa = -8; wb = (TWF == 2) ? word_t'(-4) : wb; end
      exp_q.push_back(wa + wb);
      for (int d = 0; d < NDIG; d++) begin
        @(negedge clk);
        a = wa[d*D +: D]; b = wb[d*D +: D]; wb_q[0] = wb;
        ti = '{valid: 1'b1, sof: 1'b0, lsd: (d == 0)};
        if (d == 0) t_in_q.push_back(cyc);
      end
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        ti = '0; a = dig_t'($urandom); b = dig_t'($urandom); wb_q[0] = word_t'($urandom);
      end
    end
    @(negedge clk) ti = '0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != NW) begin
      failures++;
      $display("FAIL %0d words out of %0d", n_out, NW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t acc;
  int    di;
  always @(posedge clk) if (rst_n && to.valid) begin
    if (to.lsd) begin
      di = 0;
      checks++;
      if (cyc - t_in_q.pop_front() != longint'(LAT_ADD)) begin
        failures++;
        $display("FAIL latency at cycle %0d", cyc);
      end
    end
    acc[di*D +: D] = y;
    di++;
    if (di == NDIG) begin
      word_t e;
      e = exp_q.pop_front();
      n_out++;
      checks++;
      if (acc !== e) begin
        failures++;
        $display("FAIL word %0d: got %0d expected %0d", n_out, acc, e);
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
