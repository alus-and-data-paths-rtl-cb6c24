// tb_split_alu - checks that the 2-to-1 multiplexer passes the logic unit's
// result when s = 0 (with no carry or overflow) and the arithmetic unit's
// result when s = 1, over random operands and all function codes.
module tb_split_alu;
  import alu_ops_pkg::*;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic c_in, s, c_out, ovf;
  lu_fn_t lfn;
  au_fn_t afn;
  int checks = 0, failures = 0;

  `include "au_ref.svh"

  split_alu dut (.a, .b, .c_in, .s, .lfn, .afn, .y, .c_out, .ovf);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] ly, ay;
      logic ac, av;
      a = W'($urandom); b = W'($urandom); c_in = 1'($urandom);
      lfn = lu_fn_t'($urandom_range(0, 7));
      afn = au_fn_t'($urandom_range(0, 11));
      case (int'(lfn))
        0: ly = a & b;
        1: ly = a | b;
        2: ly = a ^ b;
        3: ly = ~a;
        4: ly = ~b;
        5: ly = a;
        6: ly = b;
        default: ly = '0;
      endcase
      au_ref(int'(afn), a, b, c_in, ay, ac, av);
      s = 0;
      #1;
      checks++;
      if (y !== ly || c_out !== 0 || ovf !== 0) begin
        failures++;
        $display("FAIL logic lfn=%0d a=%h b=%h: y=%h/%h", lfn, a, b, y, ly);
      end
      s = 1;
      #1;
      checks++;
      if (y !== ay || c_out !== ac || ovf !== av) begin
        failures++;
        $display("FAIL arith afn=%0d a=%h b=%h: y=%h/%h c=%0b/%0b", afn, a, b, y, ay, c_out, ac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
