// tb_bitslice_alu16 - random-instruction test of the 16-bit four-slice array,
// built twice (with the carry-lookahead generator and with rippled carries),
// against a behavioural model that holds its own copy of the register set
// and Q register.
// All sixteen registers are first loaded from D; then random instructions
// with random addresses, data, carry and shift inputs are applied for
// 6000 cycles. Y, the carry/borrow out, sign, overflow, zero and the shift
// outputs are compared every cycle; register contents are observed through Y.
// Both builds must agree with the model. The test also counts how often the
// lookahead generator produced a carry into an upper slice that the slice
// below did not generate itself, and how often the shifts crossed slice
// boundaries, and fails if either never happened.
module tb_bitslice_alu16;
  import am2901_pkg::*;
  localparam int W = 16;
  logic         clk = 0, rst_n = 0;
  instr_t       instr;
  logic [3:0]   a_addr, b_addr;
  logic [W-1:0] d;
  logic         c_in, ram0_i, ram3_i, q0_i, q3_i;
  logic [W-1:0] y, y_rip;
  logic         ram0_o, ram3_o, q0_o, q3_o, c_out, g_n, p_n, f0, ovr, z;
  logic         ram0_o_r, ram3_o_r, q0_o_r, q3_o_r, c_out_r, g_n_r, p_n_r, f0_r, ovr_r, z_r;
  logic [W-1:0] m_ram [16];
  logic [W-1:0] m_q;
  int checks = 0, failures = 0;
  int n_lookahead = 0, n_shift = 0;

  bitslice_alu16 #(.LOOKAHEAD(1'b1)) dut (
    .clk, .rst_n, .instr, .a_addr, .b_addr, .d, .c_in,
    .ram0_i, .ram3_i, .q0_i, .q3_i, .ram0_o, .ram3_o, .q0_o, .q3_o,
    .y, .c_out, .g_n, .p_n, .f0, .ovr, .z
  );

  bitslice_alu16 #(.LOOKAHEAD(1'b0)) dut_ripple (
    .clk, .rst_n, .instr, .a_addr, .b_addr, .d, .c_in,
    .ram0_i, .ram3_i, .q0_i, .q3_i, .ram0_o(ram0_o_r), .ram3_o(ram3_o_r),
    .q0_o(q0_o_r), .q3_o(q3_o_r), .y(y_rip), .c_out(c_out_r), .g_n(g_n_r), .p_n(p_n_r),
    .f0(f0_r), .ovr(ovr_r), .z(z_r)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(input logic [W-1:0] v);
    return v[W-1] ? int'(v) - (1 << W) : int'(v);
  endfunction

  // expected outputs of the present cycle
  logic [W-1:0] e_f, e_y, e_r, e_s, e_ramw, e_qn;
  logic         e_c, e_o;

  task automatic model_eval();
    logic [W-1:0] ra, rb;
    longint t, st;
    bit arith;
    ra = m_ram[a_addr];
    rb = m_ram[b_addr];
    case (instr.src)
      SRC_AQ: begin e_r = ra; e_s = m_q; end
      SRC_AB: begin e_r = ra; e_s = rb;  end
      SRC_ZQ: begin e_r = 0;  e_s = m_q; end
      SRC_ZB: begin e_r = 0;  e_s = rb;  end
      SRC_ZA: begin e_r = 0;  e_s = ra;  end
      SRC_DA: begin e_r = d;  e_s = ra;  end
      SRC_DQ: begin e_r = d;  e_s = m_q; end
      default: begin e_r = d; e_s = 0;   end
    endcase
    arith = 1; t = 0; st = 0;
    case (instr.fn)
      FN_ADD:  begin t = longint'(e_r) + e_s + c_in; st = sx(e_r) + sx(e_s) + int'(c_in); end
      FN_SUBR: begin t = longint'(e_s) - e_r - c_in; st = sx(e_s) - sx(e_r) - int'(c_in); end
      FN_SUBS: begin t = longint'(e_r) - e_s - c_in; st = sx(e_r) - sx(e_s) - int'(c_in); end
      default: arith = 0;
    endcase
    case (instr.fn)
      FN_OR:    e_f = e_r | e_s;
      FN_AND:   e_f = e_r & e_s;
      FN_NOTRS: e_f = ~e_r & e_s;
      FN_EXOR:  e_f = e_r ^ e_s;
      FN_EXNOR: e_f = ~(e_r ^ e_s);
      default:  e_f = W'(t);
    endcase
    e_c = arith && (instr.fn == FN_ADD ? t >= (longint'(1) << W) : t < 0);
    e_o = arith && (st >= (longint'(1) << (W-1)) || st < -(longint'(1) << (W-1)));
    e_y = (instr.dst == DST_RAMA) ? ra : e_f;
    case (instr.dst)
      DST_RAMQD, DST_RAMD: e_ramw = {ram0_i, e_f[W-1:1]};
      DST_RAMQU, DST_RAMU: e_ramw = {e_f[W-2:0], ram3_i};
      default:             e_ramw = e_f;
    endcase
    case (instr.dst)
      DST_QREG:  e_qn = e_f;
      DST_RAMQD: e_qn = {q0_i, m_q[W-1:1]};
      DST_RAMQU: e_qn = {m_q[W-2:0], q3_i};
      default:   e_qn = m_q;
    endcase
  endtask

  task automatic check_outputs();
    checks++;
    if (y !== e_y || c_out !== e_c || ovr !== e_o || z !== (e_f == 0) || f0 !== e_f[W-1]) begin
      failures++;
      $display("FAIL instr=%p A=%0d B=%0d d=%h cin=%0b: y=%h/%h c=%0b/%0b ovr=%0b/%0b z=%0b",
               instr, a_addr, b_addr, d, c_in, y, e_y, c_out, e_c, ovr, e_o, z);
    end
    if (instr.dst inside {DST_RAMQD, DST_RAMD}) begin
      checks++;
      if (ram3_o !== e_f[0]) begin failures++; $display("FAIL ram3_o"); end
    end
    if (instr.dst inside {DST_RAMQU, DST_RAMU}) begin
      checks++;
      if (ram0_o !== e_f[W-1]) begin failures++; $display("FAIL ram0_o"); end
    end
    if (instr.dst == DST_RAMQD) begin
      checks++;
      if (q3_o !== m_q[0]) begin failures++; $display("FAIL q3_o"); end
    end
    if (instr.dst == DST_RAMQU) begin
      checks++;
      if (q0_o !== m_q[W-1]) begin failures++; $display("FAIL q0_o"); end
    end
    checks++;
    if (y_rip !== e_y || c_out_r !== e_c || ovr_r !== e_o || z_r !== (e_f == 0)) begin
      failures++;
      $display("FAIL ripple build y=%h/%h c=%0b/%0b", y_rip, e_y, c_out_r, e_c);
    end
    // a carry into slice 1..3 that came through the lookahead from below
    for (int k = 1; k < 4; k++)
      if (dut.cin_s[k] && dut.gn_s[k-1] && instr.fn inside {FN_ADD, FN_SUBR, FN_SUBS})
        n_lookahead++;
    if (instr.dst inside {DST_RAMQD, DST_RAMQU} && (e_f[11:4] != 0 || m_q[11:4] != 0)) n_shift++;
  endtask

  task automatic step();
    #1;
    model_eval();
    check_outputs();
    @(posedge clk);
    if (instr.dst inside {DST_RAMA, DST_RAMF, DST_RAMQD, DST_RAMD, DST_RAMQU, DST_RAMU})
      m_ram[b_addr] = e_ramw;
    m_q = e_qn;
    @(negedge clk);
  endtask

  initial begin
    instr = '{dst: DST_NOP, fn: FN_ADD, src: SRC_DZ};
    a_addr = 0; b_addr = 0; d = 0; c_in = 0;
    ram0_i = 0; ram3_i = 0; q0_i = 0; q3_i = 0;
    m_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load every register: RAM(B) <- D + 0
    for (int i = 0; i < 16; i++) begin
      instr = '{dst: DST_RAMF, fn: FN_ADD, src: SRC_DZ};
      b_addr = 4'(i); d = W'($urandom); c_in = 0;
      step();
    end
    for (int n = 0; n < 6000; n++) begin
      instr = instr_t'(9'($urandom));
      a_addr = 4'($urandom); b_addr = 4'($urandom);
      d = W'($urandom); c_in = 1'($urandom);
      if (n % 7 == 0) d = '1;          // long carry/borrow chains
      ram0_i = 1'($urandom); ram3_i = 1'($urandom);
      q0_i = 1'($urandom); q3_i = 1'($urandom);
      step();
    end
    $display("MECH lookahead_carries=%0d cross_slice_shifts=%0d", n_lookahead, n_shift);
    checks++;
    if (n_lookahead == 0) begin failures++; $display("FAIL lookahead never exercised"); end
    checks++;
    if (n_shift == 0) begin failures++; $display("FAIL cross-slice shift never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
