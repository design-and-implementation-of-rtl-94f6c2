// tb_wen_gen: exhaustive check of the byte write strobes for every
// combination of address offset and HSIZE (byte, half-word, word).
module tb_wen_gen;
  logic [1:0] addr_lo;
  logic [2:0] size;
  logic [3:0] strb, exp;
  int checks = 0, failures = 0;

  wen_gen dut (.addr_lo, .size, .strb);

  initial begin
    for (int s = 0; s < 3; s++)
      for (int a = 0; a < 4; a++) begin
        addr_lo = 2'(a); size = 3'(s);
        #1;
        exp = '0;
        for (int b = 0; b < 4; b++)
          if (b >= (a & ~((1 << s) - 1)) && b < (a & ~((1 << s) - 1)) + (1 << s)) exp[b] = 1'b1;
        checks++;
        if (strb !== exp) begin
          failures++;
          $display("size %0d addr %0d: strb %b expected %b", s, a, strb, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
