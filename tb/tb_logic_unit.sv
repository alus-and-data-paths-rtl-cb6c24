// tb_logic_unit - random operands through all eight logic-unit functions,
// compared with SystemVerilog bitwise operators.
module tb_logic_unit;
  import alu_ops_pkg::*;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  lu_fn_t fn;
  int checks = 0, failures = 0;

  logic_unit dut (.a, .b, .fn, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom);
      for (int f = 0; f < 8; f++) begin
        logic [W-1:0] ey;
        fn = lu_fn_t'(f);
        case (f)
          0: ey = a & b;
          1: ey = a | b;
          2: ey = a ^ b;
          3: ey = ~a;
          4: ey = ~b;
          5: ey = a;
          6: ey = b;
          default: ey = '0;
        endcase
        #1;
        checks++;
        if (y !== ey) begin
          failures++;
          $display("FAIL fn=%0d a=%h b=%h: y=%h/%h", f, a, b, y, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
