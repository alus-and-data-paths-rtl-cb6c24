// tb_am2901_shifter - exhaustive check of the 4-bit shifter: pass, divide
// by two (msb_i enters at the top) and multiply by two (lsb_i enters at the
// bottom), with the end bits on msb_o/lsb_o.
module tb_am2901_shifter;
  import am2901_pkg::*;
  logic [3:0] d, y;
  shift_t     mode;
  logic       msb_i, lsb_i, msb_o, lsb_o;
  int checks = 0, failures = 0;

  am2901_shifter dut (.d, .mode, .msb_i, .lsb_i, .y, .msb_o, .lsb_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < 64; i++) begin
        logic [3:0] exp;
        {d, msb_i, lsb_i} = 6'(i);
        mode = shift_t'(m);
        #1;
        case (m)
          1:       exp = 4'((int'(d) / 2) + 8 * int'(msb_i));
          2:       exp = 4'((int'(d) * 2) + int'(lsb_i));
          default: exp = d;
        endcase
        checks++;
        if (y !== exp || msb_o !== d[3] || lsb_o !== d[0]) begin
          failures++;
          $display("FAIL mode=%0d d=%b in=%b%b: y=%b exp %b", m, d, msb_i, lsb_i, y, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
