// tb_am2901_alu - exhaustive check of the 4-bit arithmetic-logic circuit:
// every function, operand pair and carry in, against integer arithmetic
// (subtractions with c_in as borrow in and c_out as borrow out), signed
// range checks for OVR, and the lookahead outputs (g equals the carry out
// with c_in = 0; g or p equals it with c_in = 1).
module tb_am2901_alu;
  import am2901_pkg::*;
  logic [3:0] r, s, f;
  fn_t        fn;
  logic       c_in, c_out, g_n, p_n, f0, ovr, z;
  int checks = 0, failures = 0;

  am2901_alu dut (.r, .s, .fn, .c_in, .f, .c_out, .g_n, .p_n, .f0, .ovr, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(input logic [3:0] v);
    return v[3] ? int'(v) - 16 : int'(v);
  endfunction

  initial begin
    for (int fi = 0; fi < 8; fi++)
      for (int i = 0; i < 512; i++) begin
        int t, st;
        logic [3:0] ef;
        logic ec, eo, arith;
        {r, s, c_in} = 9'(i);
        fn = fn_t'(fi);
        arith = 1; st = 0; t = 0;
        case (fi)
          0: begin t = int'(r) + int'(s) + int'(c_in); st = sx(r) + sx(s) + int'(c_in); end
          1: begin t = int'(s) - int'(r) - int'(c_in); st = sx(s) - sx(r) - int'(c_in); end
          2: begin t = int'(r) - int'(s) - int'(c_in); st = sx(r) - sx(s) - int'(c_in); end
          default: arith = 0;
        endcase
        case (fi)
          3: ef = r | s;
          4: ef = r & s;
          5: ef = ~r & s;
          6: ef = r ^ s;
          7: ef = ~(r ^ s);
          default: ef = 4'(t);
        endcase
        ec = arith && (fi == 0 ? t > 15 : t < 0);
        eo = arith && (st > 7 || st < -8);
        #1;
        checks++;
        if (f !== ef || c_out !== ec || ovr !== eo || z !== (ef == 0) || f0 !== ef[3]) begin
          failures++;
          $display("FAIL fn=%0d r=%h s=%h cin=%0b: f=%h/%h c=%0b/%0b ovr=%0b/%0b", fi, r, s,
                   c_in, f, ef, c_out, ec, ovr, eo);
        end
        checks++;
        if ((c_in == 0 && !g_n !== ec) || (c_in == 1 && (!g_n || !p_n) !== ec)) begin
          failures++;
          $display("FAIL g/p fn=%0d r=%h s=%h cin=%0b g_n=%0b p_n=%0b", fi, r, s, c_in, g_n, p_n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
