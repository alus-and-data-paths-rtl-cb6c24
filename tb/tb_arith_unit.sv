// tb_arith_unit - random and corner operands through all arithmetic-unit
// functions, checked against integer arithmetic (see au_ref.svh).
module tb_arith_unit;
  import alu_ops_pkg::*;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic c_in, c_out, ovf;
  au_fn_t fn;
  int checks = 0, failures = 0;

  `include "au_ref.svh"

  arith_unit dut (.a, .b, .c_in, .fn, .y, .c_out, .ovf);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = W'($urandom); b = W'($urandom); c_in = 1'($urandom);
      case (n)
        0: begin a = 8'h80; b = 8'h00; end
        1: begin a = 8'h00; b = 8'h80; end
        2: begin a = 8'h7f; b = 8'hff; end
        3: begin a = 8'h00; b = 8'h00; end
        default: ;
      endcase
      for (int f = 0; f < 12; f++) begin
        logic [W-1:0] ey;
        logic ec, ev;
        fn = au_fn_t'(f);
        au_ref(f, a, b, c_in, ey, ec, ev);
        #1;
        checks++;
        if (y !== ey || c_out !== ec || ovf !== ev) begin
          failures++;
          $display("FAIL fn=%0d a=%h b=%h cin=%0b: y=%h/%h c=%0b/%0b v=%0b/%0b", f, a, b, c_in,
                   y, ey, c_out, ec, ovf, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
