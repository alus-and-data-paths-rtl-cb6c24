// tb_am2901_slice - random-instruction test of one 4-bit ALU slice
// against a behavioural model that holds its own copy of the register set
// and Q register.
// All sixteen registers are first loaded from D; then random instructions
// with random addresses, data, carry and shift inputs are applied for
// 4000 cycles. Y, the carry/borrow out, sign, overflow, zero and the shift
// outputs are compared every cycle; register contents are observed through Y.
module tb_am2901_slice;
  import am2901_pkg::*;
  localparam int W = 4;
  logic         clk = 0, rst_n = 0;
  instr_t       instr;
  logic [3:0]   a_addr, b_addr;
  logic [W-1:0] d;
  logic         c_in, ram0_i, ram3_i, q0_i, q3_i;
  logic [W-1:0] y;
  logic         ram0_o, ram3_o, q0_o, q3_o, c_out, g_n, p_n, f0, ovr, z;
  logic [W-1:0] m_ram [16];
  logic [W-1:0] m_q;
  int checks = 0, failures = 0;

  am2901_slice dut (
    .clk, .rst_n, .instr, .a_addr, .b_addr, .d, .c_in,
    .ram0_i, .ram3_i, .q0_i, .q3_i, .ram0_o, .ram3_o, .q0_o, .q3_o,
    .y, .c_out, .g_n, .p_n, .f0, .ovr, .z
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
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
    if (c_out !== (!g_n || (!p_n && c_in))) begin failures++; $display("FAIL g/p"); end
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
    for (int n = 0; n < 4000; n++) begin
      instr = instr_t'(9'($urandom));
      a_addr = 4'($urandom); b_addr = 4'($urandom);
      d = W'($urandom); c_in = 1'($urandom);
      if (n % 7 == 0) d = '1;          // long carry/borrow chains
      ram0_i = 1'($urandom); ram3_i = 1'($urandom);
      q0_i = 1'($urandom); q3_i = 1'($urandom);
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
