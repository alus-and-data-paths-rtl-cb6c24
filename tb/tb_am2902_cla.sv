// tb_am2902_cla - exhaustive check of the lookahead generator against a
// ripple model: for every carry in and every set of active-low g/p inputs,
// c_x, c_y and c_z must equal the carries that ripple through slices 0..2.
module tb_am2902_cla;
  logic       c_n, c_x, c_y, c_z;
  logic [2:0] g_n, p_n;
  int checks = 0, failures = 0;

  am2902_cla dut (.c_n, .g_n, .p_n, .c_x, .c_y, .c_z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      logic [2:0] exp;
      logic c;
      {c_n, g_n, p_n} = 7'(i);
      c = c_n;
      for (int k = 0; k < 3; k++) begin
        c = !g_n[k] || (!p_n[k] && c);
        exp[k] = c;
      end
      #1;
      checks++;
      if ({c_z, c_y, c_x} !== exp) begin
        failures++;
        $display("FAIL cn=%0b g_n=%b p_n=%b -> %b exp %b", c_n, g_n, p_n, {c_z, c_y, c_x}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
