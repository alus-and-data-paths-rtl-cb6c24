// tb_gfu - exhaustive check of the generic function unit: for every 4-bit
// code and every input pair the output must be the code's truth-table entry,
// and the named codes (AND 8, OR 14, XOR 6, NOR 1, NAND 7) must give their
// functions.
module tb_gfu;
  logic [3:0] g;
  logic a, b, y;
  int checks = 0, failures = 0;

  gfu dut (.g, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic named(input int code, input logic x, input logic z);
    case (code)
      8:  return x & z;
      14: return x | z;
      6:  return x ^ z;
      1:  return ~(x | z);
      7:  return ~(x & z);
      12: return x;
      10: return z;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int c = 0; c < 16; c++)
      for (int i = 0; i < 4; i++) begin
        g = 4'(c); a = i[1]; b = i[0];
        #1;
        checks++;
        if (y !== ((c >> (2*a + b)) & 1)) begin
          failures++;
          $display("FAIL g=%0d a=%0b b=%0b y=%0b", c, a, b, y);
        end
        if (c inside {8, 14, 6, 1, 7, 12, 10}) begin
          checks++;
          if (y !== named(c, a, b)) begin
            failures++;
            $display("FAIL named g=%0d a=%0b b=%0b y=%0b", c, a, b, y);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
