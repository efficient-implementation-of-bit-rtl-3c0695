// tb_ppa_adder: checks the parallel prefix adder's sum and carry out against
// integer addition, exhaustively at its default width (2 bits, one bit slice)
// and at 4 bits (a whole data word), and with random operands at 8 bits.
module tb_ppa_adder;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic       c2i, c2o;
  logic [3:0] a4, b4, s4;
  logic       c4i, c4o;
  logic [7:0] a8, b8, s8;
  logic       c8i, c8o;

  ppa_adder dut2 (.a(a2), .b(b2), .cin(c2i), .sum(s2), .cout(c2o));
  ppa_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));
  ppa_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(c8i), .sum(s8), .cout(c8o));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {c2i, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({c2o, s2} !== 3'(a2 + b2 + c2i)) begin
        failures++;
        $display("FAIL 2-bit %0d+%0d+%0d -> %0d", a2, b2, c2i, {c2o, s2});
      end
    end
    for (int i = 0; i < 512; i++) begin
      {c4i, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({c4o, s4} !== 5'(a4 + b4 + c4i)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d -> %0d", a4, b4, c4i, {c4o, s4});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8i = 1'($urandom);
      if (i < 2) begin a8 = 8'hff; b8 = 8'(i); c8i = 1'b1; end
      #1;
      checks++;
      if ({c8o, s8} !== 9'(a8 + b8 + c8i)) begin
        failures++;
        $display("FAIL 8-bit %0d+%0d+%0d -> %0d", a8, b8, c8i, {c8o, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
