// tb_fixed_point_alu - drives the accumulator ALU through random sequences
// of loads and operations and compares AC, MQ, DR and the flags after each
// one with a behavioural model: AC <- AC + DR, AC - DR, AC & DR, AC | DR,
// AC ^ DR, ~AC; AC,MQ <- DR x MQ (unsigned, AC high half); MQ <- MQ / DR and
// AC <- MQ mod DR (unsigned; division by zero gives quotient all ones,
// remainder the dividend and V set). Also checks the latency: done 1 cycle
// after start for single-step operations and WIDTH+1 for MUL and DIV.
module tb_fixed_point_alu;
  import fpalu_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, start, busy, done;
  fp_op_t op;
  logic [W-1:0] bus_in, ac, mq, dr;
  logic flag_z, flag_n, flag_c, flag_v;
  logic [W-1:0] m_ac, m_mq, m_dr;
  logic m_z, m_n, m_c, m_v;
  int checks = 0, failures = 0, n_mul = 0, n_div = 0, n_div0 = 0;

  fixed_point_alu dut (
    .clk, .rst_n, .start, .op, .bus_in, .ac, .mq, .dr,
    .flag_z, .flag_n, .flag_c, .flag_v, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(input logic [W-1:0] v);
    return v[W-1] ? int'(v) - (1 << W) : int'(v);
  endfunction

  task automatic model(input fp_op_t o, input logic [W-1:0] bus);
    longint t, st;
    logic [2*W-1:0] p;
    case (o)
      OP_LDAC: m_ac = bus;
      OP_LDMQ: m_mq = bus;
      OP_LDDR: m_dr = bus;
      OP_ADD, OP_SUB: begin
        if (o == OP_ADD) begin t = longint'(m_ac) + m_dr; st = sx(m_ac) + sx(m_dr); m_c = t > 65535; end
        else begin t = longint'(m_ac) - m_dr; st = sx(m_ac) - sx(m_dr); m_c = t < 0; end
        m_ac = W'(t);
        m_v = st > 32767 || st < -32768;
        m_z = m_ac == 0; m_n = m_ac[W-1];
      end
      OP_AND, OP_OR, OP_XOR, OP_NOT: begin
        case (o)
          OP_AND:  m_ac = m_ac & m_dr;
          OP_OR:   m_ac = m_ac | m_dr;
          OP_XOR:  m_ac = m_ac ^ m_dr;
          default: m_ac = ~m_ac;
        endcase
        m_c = 0; m_v = 0; m_z = m_ac == 0; m_n = m_ac[W-1];
      end
      OP_MUL: begin
        p = (2*W)'(m_dr) * (2*W)'(m_mq);
        {m_ac, m_mq} = p;
      end
      OP_DIV: begin
        if (m_dr == 0) begin m_ac = m_mq; m_mq = '1; m_v = 1; end
        else begin m_ac = m_mq % m_dr; m_mq = m_mq / m_dr; m_v = 0; end
      end
      default: ;
    endcase
  endtask

  task automatic run(input fp_op_t o, input logic [W-1:0] bus);
    int lat;
    @(negedge clk);
    op = o; start = 1; bus_in = bus;
    model(o, bus);
    @(negedge clk);
    start = 0; bus_in = W'($urandom);
    lat = 1;
    while (!done && lat < 4 * W) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != ((o == OP_MUL || o == OP_DIV) ? W + 1 : 1)) begin
      failures++;
      $display("FAIL latency of %s: %0d", o.name(), lat);
    end
    checks++;
    if (ac !== m_ac || mq !== m_mq || dr !== m_dr ||
        {flag_z, flag_n, flag_c, flag_v} !== {m_z, m_n, m_c, m_v}) begin
      failures++;
      $display("FAIL %s: ac=%h/%h mq=%h/%h dr=%h/%h flags=%b/%b", o.name(), ac, m_ac, mq, m_mq,
               dr, m_dr, {flag_z, flag_n, flag_c, flag_v}, {m_z, m_n, m_c, m_v});
    end
    if (o == OP_MUL) n_mul++;
    if (o == OP_DIV) begin n_div++; if (m_dr == 0 || dr == 0) n_div0++; end
  endtask

  initial begin
    start = 0; op = OP_NOP; bus_in = 0;
    m_ac = 0; m_mq = 0; m_dr = 0; {m_z, m_n, m_c, m_v} = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fixed cases: 3 x 5, 100 / 7, 0xffff x 0xffff, division by zero
    run(OP_LDDR, 16'd3);    run(OP_LDMQ, 16'd5);   run(OP_MUL, 0);
    run(OP_LDDR, 16'd7);    run(OP_LDMQ, 16'd100); run(OP_DIV, 0);
    run(OP_LDDR, 16'hffff); run(OP_LDMQ, 16'hffff); run(OP_MUL, 0);
    run(OP_LDDR, 16'd0);    run(OP_LDMQ, 16'd1234); run(OP_DIV, 0);
    run(OP_LDDR, 16'd1);    run(OP_LDAC, 16'h7fff); run(OP_ADD, 0);
    for (int n = 0; n < 1500; n++) begin
      fp_op_t o;
      logic [W-1:0] v;
      o = fp_op_t'(1 + $urandom_range(0, 10));
      v = W'($urandom);
      if ($urandom_range(0, 3) == 0) v = W'($urandom_range(0, 20));
      run(o, v);
    end
    checks++;
    if (n_mul == 0 || n_div == 0 || n_div0 == 0) begin
      failures++;
      $display("FAIL mechanisms mul=%0d div=%0d div0=%0d", n_mul, n_div, n_div0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
