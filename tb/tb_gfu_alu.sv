// tb_gfu_alu - checks the 8-bit generic ALU with the code sets of its
// function table (A, A and B, A or B, A+B+Cin, A+B, A+1, A-B with and
// without borrow) and with all sixteen logic codes, on random and corner
// operands, against integer arithmetic and bitwise operators.
module tb_gfu_alu;
  localparam int W = 8;
  logic [3:0] p_code, k_code, r_code;
  logic [W-1:0] a, b, r;
  logic c_in, c_out;
  int checks = 0, failures = 0;

  gfu_alu dut (.p_code, .k_code, .r_code, .a, .b, .c_in, .r, .c_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int p, input int k, input int rr, input logic ci,
                     input logic [W-1:0] exp_r, input logic exp_c, input logic chk_c,
                     input string what);
    p_code = 4'(p); k_code = 4'(k); r_code = 4'(rr); c_in = ci;
    #1;
    checks++;
    if (r !== exp_r || (chk_c && c_out !== exp_c)) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%0b: r=%h exp %h c=%0b exp %0b", what, a, b, ci,
               r, exp_r, c_out, exp_c);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int s, d;
      logic ci;
      logic [W-1:0] lexp;
      case (n)
        0: begin a = '1; b = 8'd1; end
        1: begin a = '0; b = '1; end
        2: begin a = '1; b = '1; end
        3: begin a = '0; b = '0; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      ci = 1'($urandom);
      run(12, 0, 12, 1'b0, a, 1'b0, 1'b0, "A");
      run(8, 0, 12, 1'b0, a & b, 1'b0, 1'b0, "AND");
      run(14, 0, 12, 1'b0, a | b, 1'b0, 1'b0, "OR");
      s = int'(a) + int'(b) + int'(ci);
      run(6, 1, 6, ci, W'(s), s[W], 1'b1, "A+B+Cin");
      s = int'(a) + int'(b);
      run(6, 1, 6, 1'b0, W'(s), s[W], 1'b1, "A+B");
      s = int'(a) + 1;
      run(12, 3, 6, 1'b1, W'(s), s[W], 1'b1, "A+1");
      d = int'(a) - int'(b);
      run(9, 4, 9, 1'b0, W'(d), d < 0, 1'b1, "A-B");
      d = int'(a) - int'(b) - int'(ci);
      run(9, 4, 9, ci, W'(d), d < 0, 1'b1, "A-B-Bin");
      for (int g = 0; g < 16; g++) begin
        for (int i = 0; i < W; i++) lexp[i] = g[2*a[i] + b[i]];
        run(g, 0, 12, 1'b0, lexp, 1'b0, 1'b0, "logic");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
