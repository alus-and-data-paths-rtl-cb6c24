// tb_am2901_decoder - checks each source, function and destination code
// against the instruction tables: which operands reach R and S, which
// function is chosen, what is written to RAM(B) and Q, how the shifters
// move and what Y shows.
module tb_am2901_decoder;
  import am2901_pkg::*;
  instr_t instr;
  ctrl_t  ctrl;
  int checks = 0, failures = 0;

  am2901_decoder dut (.instr, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected R: 0 = zero, 1 = RAM(A), 2 = D;  S: 0 RAM(A), 1 RAM(B), 2 Q, 3 zero
  int exp_r [8] = '{1, 1, 0, 0, 0, 2, 2, 2};
  int exp_s [8] = '{2, 1, 2, 1, 0, 0, 2, 3};
  // destinations: RAM write, RAM shift (0 pass 1 down 2 up), Q write, Q shift, Y=A
  int exp_rw [8] = '{0, 0, 1, 1, 1, 1, 1, 1};
  int exp_rs [8] = '{0, 0, 0, 0, 1, 1, 2, 2};
  int exp_qw [8] = '{1, 0, 0, 0, 1, 0, 1, 0};
  int exp_qs [8] = '{0, 0, 0, 0, 1, 0, 2, 0};
  int exp_ya [8] = '{0, 0, 1, 0, 0, 0, 0, 0};

  initial begin
    for (int i = 0; i < 512; i++) begin
      int rsel, src, fn, dst;
      instr = instr_t'(9'(i));
      src = i % 8; fn = (i / 8) % 8; dst = i / 64;
      #1;
      rsel = ctrl.r_is_a ? 1 : (ctrl.r_is_d ? 2 : 0);
      checks++;
      if (rsel != exp_r[src] || int'(ctrl.s_sel) != exp_s[src] || int'(ctrl.fn) != fn ||
          int'(ctrl.ram_we) != exp_rw[dst] || int'(ctrl.q_we) != exp_qw[dst] ||
          int'(ctrl.y_is_a) != exp_ya[dst] ||
          (exp_rw[dst] != 0 && int'(ctrl.ram_shift) != exp_rs[dst]) ||
          (exp_qw[dst] != 0 && int'(ctrl.q_shift) != exp_qs[dst])) begin
        failures++;
        $display("FAIL instr src=%0d fn=%0d dst=%0d ctrl=%b", src, fn, dst, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
