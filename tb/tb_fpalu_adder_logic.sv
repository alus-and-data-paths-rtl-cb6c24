// tb_fpalu_adder_logic - random and corner operands through every function
// of the adder/logic block, against integer arithmetic: result, carry or
// borrow, signed overflow, zero and sign.
module tb_fpalu_adder_logic;
  import fpalu_pkg::*;
  localparam int W = 16;
  logic [W-1:0] a, b, y;
  al_fn_t fn;
  logic carry, ovf, zero, neg;
  int checks = 0, failures = 0;

  fpalu_adder_logic dut (.a, .b, .fn, .y, .carry, .ovf, .zero, .neg);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(input logic [W-1:0] v);
    return v[W-1] ? int'(v) - (1 << W) : int'(v);
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int f = 0; f < 6; f++) begin
        int t, st;
        logic [W-1:0] ey;
        logic ec, ev;
        case (n)
          0: begin a = 16'h7fff; b = 16'h0001; end
          1: begin a = 16'h8000; b = 16'h0001; end
          2: begin a = 16'hffff; b = 16'hffff; end
          3: begin a = 16'h1234; b = 16'h1234; end
          default: begin a = W'($urandom); b = W'($urandom); end
        endcase
        fn = al_fn_t'(f);
        ec = 0; ev = 0;
        case (f)
          0: begin t = int'(a) + int'(b); st = sx(a) + sx(b); ey = W'(t); ec = t > 65535;
                   ev = st > 32767 || st < -32768; end
          1: begin t = int'(a) - int'(b); st = sx(a) - sx(b); ey = W'(t); ec = t < 0;
                   ev = st > 32767 || st < -32768; end
          2: ey = a & b;
          3: ey = a | b;
          4: ey = a ^ b;
          default: ey = ~a;
        endcase
        #1;
        checks++;
        if (y !== ey || carry !== ec || ovf !== ev || zero !== (ey == 0) || neg !== ey[W-1]) begin
          failures++;
          $display("FAIL fn=%0d a=%h b=%h: y=%h/%h c=%0b/%0b v=%0b/%0b", f, a, b, y, ey,
                   carry, ec, ovf, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
