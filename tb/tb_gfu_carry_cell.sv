// tb_gfu_carry_cell - exhaustive check of the carry cell, both against the
// equation P C + P' K' and, for the addition codes (P = A xor B, K = A'B'),
// against the full-adder carry AB + AC + BC.
module tb_gfu_carry_cell;
  logic p, k, c, c_next;
  int checks = 0, failures = 0;

  gfu_carry_cell dut (.p, .k, .c, .c_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {p, k, c} = 3'(i);
      #1;
      checks++;
      if (c_next !== (p ? c : !k)) begin
        failures++;
        $display("FAIL p=%0b k=%0b c=%0b -> %0b", p, k, c, c_next);
      end
    end
    for (int i = 0; i < 8; i++) begin
      logic x, z;
      {x, z, c} = 3'(i);
      p = x ^ z;
      k = !x && !z;
      #1;
      checks++;
      if (c_next !== ((x & z) | (x & c) | (z & c))) begin
        failures++;
        $display("FAIL adder carry a=%0b b=%0b c=%0b -> %0b", x, z, c, c_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
