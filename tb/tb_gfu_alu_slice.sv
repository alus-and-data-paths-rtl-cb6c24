// tb_gfu_alu_slice - checks one generic ALU bit: for the addition codes
// (P 6, K 1, R 6) and the subtraction codes (P 9, K 4, R 9) against the
// full-adder and full-subtractor truth tables, and for all sixteen logic
// codes with R = 12 against the code's truth table.
module tb_gfu_alu_slice;
  logic [3:0] p_code, k_code, r_code;
  logic a, b, c, r, c_next;
  int checks = 0, failures = 0;

  gfu_alu_slice dut (.p_code, .k_code, .r_code, .a, .b, .c, .r, .c_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got_r, input logic exp_r,
                           input logic got_c, input logic exp_c, input string what);
    checks++;
    if (got_r !== exp_r || got_c !== exp_c) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b: r=%0b/%0b c'=%0b/%0b", what, a, b, c,
               got_r, exp_r, got_c, exp_c);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      int s, d;
      {a, b, c} = 3'(i);
      // addition
      p_code = 4'd6; k_code = 4'd1; r_code = 4'd6;
      #1;
      s = int'(a) + int'(b) + int'(c);
      expect_eq(r, s[0], c_next, s[1], "add");
      // subtraction a - b - borrow
      p_code = 4'd9; k_code = 4'd4; r_code = 4'd9;
      #1;
      d = int'(a) - int'(b) - int'(c);
      expect_eq(r, d[0], c_next, d < 0, "sub");
      // increment a (k = A')
      p_code = 4'd12; k_code = 4'd3; r_code = 4'd6;
      #1;
      s = int'(a) + int'(c);
      expect_eq(r, s[0], c_next, s[1], "inc");
    end
    for (int g = 0; g < 16; g++)
      for (int i = 0; i < 4; i++) begin
        {a, b} = 2'(i);
        c = 1'b0;
        p_code = 4'(g); k_code = 4'd0; r_code = 4'd12;
        #1;
        checks++;
        if (r !== g[2*a + b]) begin
          failures++;
          $display("FAIL logic code %0d a=%0b b=%0b r=%0b", g, a, b, r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
