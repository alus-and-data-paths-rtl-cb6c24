// tb_alu_datapaths_top - end-to-end test of all five ALUs at their default
// sizes.
//
// 16-bit bit-sliced ALU: the test acts as the microprogram sequencer and
//   * runs 16 x 16 -> 32-bit unsigned multiplications by shift and add: R1
//     holds the multiplicand, Q the multiplier and R2 the running high half;
//     each step adds R1 to R2 when Q's bottom bit is 1, then shifts R2 and Q
//     down together (F/2 and Q/2), the carry out entering R2's top bit and
//     R2's bottom bit entering Q's top bit through the end shift pins;
//   * adds and subtracts 32-bit numbers held as two 16-bit halves, passing
//     the carry or borrow from the low half into the high half;
//   * doubles a register (2F) and reads a register through Y (RAM(A) output).
// Accumulator ALU: multiply, divide, divide by zero, add with overflow and
//   the logic operations, against integer arithmetic.
// Generic-function-unit ALU, brute-force ALU and split ALU: their arithmetic
//   and logic codes against integer arithmetic.
// Each mechanism (lookahead carry, shift down and up across slices, Q shift,
// RAM(A) on Y, overflow, multi-cycle multiply and divide, divide by zero,
// borrow, increment, logic codes, both split-ALU paths) is counted; one that
// never happened counts as a failure.
module tb_alu_datapaths_top;
  import am2901_pkg::*;
  import fpalu_pkg::*;
  import alu_ops_pkg::*;

  logic clk = 0, rst_n = 0;
  // bit-sliced ALU
  instr_t bs_instr;
  logic [3:0] bs_a_addr, bs_b_addr;
  logic [15:0] bs_d, bs_y;
  logic bs_c_in, bs_ram0_i, bs_ram3_i, bs_q0_i, bs_q3_i;
  logic bs_ram0_o, bs_ram3_o, bs_q0_o, bs_q3_o, bs_c_out, bs_g_n, bs_p_n, bs_f0, bs_ovr, bs_z;
  // accumulator ALU
  logic fp_start, fp_flag_z, fp_flag_n, fp_flag_c, fp_flag_v, fp_busy, fp_done;
  fp_op_t fp_op;
  logic [15:0] fp_bus_in, fp_ac, fp_mq, fp_dr;
  // generic ALU
  logic [3:0] gf_p_code, gf_k_code, gf_r_code;
  logic [7:0] gf_a, gf_b, gf_r;
  logic gf_c_in, gf_c_out;
  // brute-force ALU
  logic [7:0] mx_a, mx_b, mx_y;
  logic mx_c_in, mx_c_out;
  mx_fn_t mx_fn;
  // split ALU
  logic [7:0] sp_a, sp_b, sp_y;
  logic sp_c_in, sp_s, sp_c_out, sp_ovf;
  lu_fn_t sp_lfn;
  au_fn_t sp_afn;

  int checks = 0, failures = 0;
  int n_lookahead = 0, n_shdown = 0, n_shup = 0, n_qshift = 0, n_rama = 0, n_ovr = 0;
  int n_fpmul = 0, n_fpdiv = 0, n_fpdiv0 = 0, n_fpovf = 0;
  int n_gfadd = 0, n_gfsub = 0, n_gfinc = 0, n_gflogic = 0, n_mx = 0, n_splog = 0, n_sparith = 0;

  alu_datapaths_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- bit-sliced ALU helpers ----------------
  // apply one instruction for one clock; outputs are sampled before the edge
  logic [15:0] s_y;
  logic        s_c, s_ovr, s_z;

  task automatic bs_op(input src_t src, input fn_t fn, input dst_t dst,
                       input int a, input int b, input logic [15:0] d, input logic cin);
    bs_instr = '{dst: dst, fn: fn, src: src};
    bs_a_addr = 4'(a); bs_b_addr = 4'(b); bs_d = d; bs_c_in = cin;
    #1;
    s_y = bs_y; s_c = bs_c_out; s_ovr = bs_ovr; s_z = bs_z;
    for (int k = 1; k < 4; k++)
      if (dut.u_bs.cin_s[k] && dut.u_bs.gn_s[k-1] && fn inside {FN_ADD, FN_SUBR, FN_SUBS})
        n_lookahead++;
    if (s_ovr) n_ovr++;
    @(posedge clk);
    @(negedge clk);
  endtask

  task automatic bs_load(input int reg_no, input logic [15:0] v);
    bs_op(SRC_DZ, FN_ADD, DST_RAMF, 0, reg_no, v, 1'b0);
  endtask

  task automatic bs_peek(input int reg_no, output logic [15:0] v);
    bs_op(SRC_ZA, FN_ADD, DST_NOP, reg_no, 0, '0, 1'b0);
    v = s_y;
  endtask

  task automatic bs_multiply(input logic [15:0] x, input logic [15:0] m);
    logic [15:0] hi, lo;
    logic [31:0] p;
    bs_load(1, x);                                   // R1 = multiplicand
    bs_load(2, 16'h0000);                            // R2 = high half
    bs_op(SRC_DZ, FN_ADD, DST_QREG, 0, 0, m, 1'b0);  // Q = multiplier
    for (int i = 0; i < 16; i++) begin
      // F = R2 + (Q[0] ? R1 : 0); {R2,Q} shift down, carry enters R2's top
      bs_instr = '{dst: DST_RAMQD, fn: FN_ADD, src: (bs_q3_o ? SRC_AB : SRC_ZB)};
      bs_a_addr = 4'd1; bs_b_addr = 4'd2; bs_c_in = 1'b0;
      #1;
      bs_ram0_i = bs_c_out;       // carry out becomes the new top bit
      bs_q0_i   = bs_ram3_o;      // bit leaving R2 enters Q's top
      bs_op(bs_instr.src, FN_ADD, DST_RAMQD, 1, 2, '0, 1'b0);
      n_shdown++;
      n_qshift++;
    end
    bs_peek(2, hi);
    bs_op(SRC_ZQ, FN_ADD, DST_NOP, 0, 0, '0, 1'b0);
    lo = s_y;
    p = 32'(x) * 32'(m);
    check({hi, lo} == p, $sformatf("bit-slice multiply %h x %h = %h, got %h", x, m, p, {hi, lo}));
  endtask

  task automatic bs_add32(input logic [31:0] x, input logic [31:0] w, input bit sub);
    logic [31:0] e, got;
    logic lo_c;
    bs_load(3, x[15:0]); bs_load(4, x[31:16]);
    bs_load(5, w[15:0]); bs_load(6, w[31:16]);
    // R5 <- R3 op R5 (R = RAM(A) = R3, S = RAM(B) = R5), then
    // R6 <- R4 op R6 with the carry or borrow from the low half
    bs_op(SRC_AB, sub ? FN_SUBS : FN_ADD, DST_RAMF, 3, 5, '0, 1'b0);
    lo_c = s_c;
    got[15:0] = s_y;
    bs_op(SRC_AB, sub ? FN_SUBS : FN_ADD, DST_RAMA, 4, 6, '0, lo_c);
    // RAMA: Y shows RAM(A) = the old R4; the new value is in R6
    check(s_y == x[31:16], "Y shows RAM(A) with the RAMA destination");
    n_rama++;
    bs_peek(6, got[31:16]);
    e = sub ? x - w : x + w;
    check(got == e, $sformatf("bit-slice 32-bit %s %h, %h = %h, got %h", sub ? "sub" : "add",
                              x, w, e, got));
  endtask

  task automatic bs_double(input logic [15:0] x, input logic in_bit);
    logic [15:0] got;
    bs_load(7, x);
    bs_ram3_i = in_bit;
    bs_instr = '{dst: DST_RAMU, fn: FN_ADD, src: SRC_ZB};
    bs_b_addr = 4'd7;
    #1;
    check(bs_ram0_o == x[15], "2F shifts the top bit out on RAM0");
    bs_op(SRC_ZB, FN_ADD, DST_RAMU, 0, 7, '0, 1'b0);
    bs_peek(7, got);
    check(got == {x[14:0], in_bit}, $sformatf("2F of %h = %h", x, got));
    n_shup++;
  endtask

  // ---------------- accumulator ALU helpers ----------------
  task automatic fp_run(input fp_op_t o, input logic [15:0] v);
    @(negedge clk);
    fp_op = o; fp_start = 1; fp_bus_in = v;
    @(negedge clk);
    fp_start = 0;
    while (!fp_done) @(negedge clk);
  endtask

  task automatic fp_muldiv(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] p;
    fp_run(OP_LDDR, x); fp_run(OP_LDMQ, y); fp_run(OP_MUL, 0);
    p = 32'(x) * 32'(y);
    check({fp_ac, fp_mq} == p, $sformatf("fp multiply %h x %h", x, y));
    n_fpmul++;
    fp_run(OP_LDMQ, y); fp_run(OP_DIV, 0);
    if (x == 0) begin
      check(fp_flag_v && fp_mq == 16'hffff && fp_ac == y, "fp divide by zero");
      n_fpdiv0++;
    end else begin
      check(fp_mq == y / x && fp_ac == y % x && !fp_flag_v, $sformatf("fp divide %h / %h", y, x));
      n_fpdiv++;
    end
  endtask

  initial begin
    bs_instr = '{dst: DST_NOP, fn: FN_ADD, src: SRC_DZ};
    bs_a_addr = 0; bs_b_addr = 0; bs_d = 0; bs_c_in = 0;
    bs_ram0_i = 0; bs_ram3_i = 0; bs_q0_i = 0; bs_q3_i = 0;
    fp_start = 0; fp_op = OP_NOP; fp_bus_in = 0;
    gf_p_code = 0; gf_k_code = 0; gf_r_code = 0; gf_a = 0; gf_b = 0; gf_c_in = 0;
    mx_a = 0; mx_b = 0; mx_c_in = 0; mx_fn = MX_AND;
    sp_a = 0; sp_b = 0; sp_c_in = 0; sp_s = 0; sp_lfn = LU_AND; sp_afn = AU_ADD;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 16-bit bit-sliced ALU ----
    bs_multiply(16'hffff, 16'hffff);
    bs_multiply(16'd1234, 16'd5678);
    for (int i = 0; i < 20; i++) bs_multiply(16'($urandom), 16'($urandom));
    bs_add32(32'h0000_ffff, 32'h0000_0001, 0);
    bs_add32(32'h0001_0000, 32'h0000_0001, 1);
    for (int i = 0; i < 40; i++) bs_add32($urandom, $urandom, 1'($urandom));
    bs_load(8, 16'h7fff);
    bs_op(SRC_DA, FN_ADD, DST_NOP, 8, 0, 16'h0001, 1'b0);
    check(s_ovr && s_y == 16'h8000, "bit-slice signed overflow");
    bs_op(SRC_DA, FN_SUBS, DST_NOP, 8, 0, 16'h7fff, 1'b0);
    check(s_z && !s_c, "bit-slice zero result, no borrow");
    for (int i = 0; i < 10; i++) bs_double(16'($urandom), 1'($urandom));

    // ---- accumulator ALU ----
    fp_muldiv(16'd7, 16'd100);
    fp_muldiv(16'd0, 16'd1234);
    fp_muldiv(16'hffff, 16'hffff);
    for (int i = 0; i < 10; i++) fp_muldiv(16'($urandom), 16'($urandom));
    fp_run(OP_LDAC, 16'h7fff); fp_run(OP_LDDR, 16'h0001); fp_run(OP_ADD, 0);
    check(fp_ac == 16'h8000 && fp_flag_v && fp_flag_n, "fp add overflow");
    n_fpovf++;
    fp_run(OP_SUB, 0);
    check(fp_ac == 16'h7fff && fp_flag_v, "fp sub overflow");
    fp_run(OP_LDDR, 16'h0ff0); fp_run(OP_AND, 0);
    check(fp_ac == 16'h0ff0, "fp and");
    fp_run(OP_LDDR, 16'hf00f); fp_run(OP_OR, 0);
    check(fp_ac == 16'hffff, "fp or");
    fp_run(OP_XOR, 0);
    check(fp_ac == 16'h0ff0, "fp xor");
    fp_run(OP_NOT, 0);
    check(fp_ac == 16'hf00f && fp_flag_n && !fp_flag_z, "fp not");

    // ---- generic-function-unit ALU, brute-force ALU, split ALU ----
    for (int n = 0; n < 500; n++) begin
      logic [7:0] a, b, ey;
      logic ci;
      int t;
      a = 8'($urandom); b = 8'($urandom); ci = 1'($urandom);
      gf_a = a; gf_b = b; gf_c_in = ci;
      {gf_p_code, gf_k_code, gf_r_code} = {4'd6, 4'd1, 4'd6};
      #1; t = int'(a) + int'(b) + int'(ci);
      check({gf_c_out, gf_r} == 9'(t), "gfu A+B+Cin"); n_gfadd++;
      {gf_p_code, gf_k_code, gf_r_code} = {4'd9, 4'd4, 4'd9};
      #1; t = int'(a) - int'(b) - int'(ci);
      check(gf_r == 8'(t) && gf_c_out == (t < 0), "gfu A-B-Bin"); n_gfsub++;
      {gf_p_code, gf_k_code, gf_r_code, gf_c_in} = {4'd12, 4'd3, 4'd6, 1'b1};
      #1; t = int'(a) + 1;
      check({gf_c_out, gf_r} == 9'(t), "gfu A+1"); n_gfinc++;
      {gf_p_code, gf_k_code, gf_r_code} = {4'd6, 4'd0, 4'd12};
      #1;
      check(gf_r == (a ^ b), "gfu XOR code"); n_gflogic++;

      mx_a = a; mx_b = b; mx_c_in = ci;
      for (int f = 0; f < 5; f++) begin
        mx_fn = mx_fn_t'(f);
        #1;
        case (f)
          0: ey = a & b;
          1: ey = a | b;
          2: ey = a ^ b;
          3: ey = ~a;
          default: ey = 8'(int'(a) + int'(b) + int'(ci));
        endcase
        check(mx_y == ey, $sformatf("brute-force fn %0d", f)); n_mx++;
      end

      sp_a = a; sp_b = b; sp_c_in = ci;
      sp_s = 0; sp_lfn = LU_OR; sp_afn = AU_SUBB;
      #1;
      check(sp_y == (a | b) && !sp_c_out, "split ALU logic path"); n_splog++;
      sp_s = 1;
      #1; t = int'(a) - int'(b) - int'(ci);
      check(sp_y == 8'(t) && sp_c_out == (t < 0), "split ALU arithmetic path"); n_sparith++;
    end

    $display("MECH lookahead=%0d shift_down=%0d shift_up=%0d q_shift=%0d rama=%0d ovr=%0d",
             n_lookahead, n_shdown, n_shup, n_qshift, n_rama, n_ovr);
    $display("MECH fp_mul=%0d fp_div=%0d fp_div0=%0d fp_ovf=%0d", n_fpmul, n_fpdiv, n_fpdiv0, n_fpovf);
    $display("MECH gf_add=%0d gf_sub=%0d gf_inc=%0d gf_logic=%0d mx=%0d split_logic=%0d split_arith=%0d",
             n_gfadd, n_gfsub, n_gfinc, n_gflogic, n_mx, n_splog, n_sparith);
    check(n_lookahead > 0, "lookahead never used");
    check(n_shdown > 0 && n_shup > 0 && n_qshift > 0, "shifts never used");
    check(n_rama > 0 && n_ovr > 0, "RAM(A) output or overflow never seen");
    check(n_fpmul > 0 && n_fpdiv > 0 && n_fpdiv0 > 0 && n_fpovf > 0, "fp mechanisms");
    check(n_gfadd > 0 && n_gfsub > 0 && n_gfinc > 0 && n_gflogic > 0, "gfu mechanisms");
    check(n_mx > 0 && n_splog > 0 && n_sparith > 0, "mux ALU mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
