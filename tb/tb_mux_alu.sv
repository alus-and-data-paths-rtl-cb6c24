// tb_mux_alu - random and corner operands through every function code of
// the brute-force ALU, against bitwise operators and integer addition.
module tb_mux_alu;
  import alu_ops_pkg::*;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic c_in, c_out;
  mx_fn_t fn;
  int checks = 0, failures = 0;

  mux_alu dut (.a, .b, .c_in, .fn, .y, .c_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = W'($urandom); b = W'($urandom); c_in = 1'($urandom);
      if (n == 0) begin a = '1; b = '0; c_in = 1; end
      for (int f = 0; f < 8; f++) begin
        logic [W-1:0] ey;
        int s;
        fn = mx_fn_t'(f);
        s = int'(a) + int'(b) + int'(c_in);
        case (f)
          0: ey = a & b;
          1: ey = a | b;
          2: ey = a ^ b;
          3: ey = ~a;
          4: ey = W'(s);
          default: ey = '0;
        endcase
        #1;
        checks++;
        if (y !== ey || c_out !== s[W]) begin
          failures++;
          $display("FAIL fn=%0d a=%h b=%h cin=%0b: y=%h/%h c=%0b", f, a, b, c_in, y, ey, c_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
