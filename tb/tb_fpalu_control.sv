// tb_fpalu_control - checks the control unit's sequencing: which register
// transfer it orders for each operation, that MUL and DIV keep busy high for
// exactly WIDTH step cycles with the right step controls, that done pulses
// 1 cycle after a single-step operation and WIDTH+1 cycles after MUL/DIV,
// and that start is ignored while busy.
module tb_fpalu_control;
  import fpalu_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, start, busy, done;
  fp_op_t op;
  fp_ctrl_t ctrl;
  int checks = 0, failures = 0;

  fpalu_control dut (.clk, .rst_n, .start, .op, .ctrl, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (op=%s ctrl=%p busy=%0b done=%0b)", what, op.name(), ctrl, busy, done);
    end
  endtask

  // issue one operation and follow it to done; returns the latency
  task automatic run(input fp_op_t o);
    int lat;
    @(negedge clk);
    op = o; start = 1;
    #1;
    case (o)
      OP_LDAC: expect_true(ctrl.ac_sel == AC_BUS, "LDAC selects bus");
      OP_LDMQ: expect_true(ctrl.mq_sel == MQ_BUS, "LDMQ selects bus");
      OP_LDDR: expect_true(ctrl.dr_load, "LDDR loads DR");
      OP_ADD:  expect_true(ctrl.ac_sel == AC_ALU && ctrl.fn == AL_ADD && ctrl.flags_we, "ADD");
      OP_SUB:  expect_true(ctrl.ac_sel == AC_ALU && ctrl.fn == AL_SUB && ctrl.flags_we, "SUB");
      OP_AND:  expect_true(ctrl.ac_sel == AC_ALU && ctrl.fn == AL_AND, "AND");
      OP_OR:   expect_true(ctrl.ac_sel == AC_ALU && ctrl.fn == AL_OR, "OR");
      OP_XOR:  expect_true(ctrl.ac_sel == AC_ALU && ctrl.fn == AL_XOR, "XOR");
      OP_NOT:  expect_true(ctrl.ac_sel == AC_ALU && ctrl.fn == AL_NOT, "NOT");
      OP_MUL:  expect_true(ctrl.ac_sel == AC_ZERO, "MUL clears AC");
      OP_DIV:  expect_true(ctrl.ac_sel == AC_ZERO && ctrl.div_chk, "DIV clears AC");
      default: ;
    endcase
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      if (o == OP_MUL)
        expect_true(busy && ctrl.ac_sel == AC_MULSTEP && ctrl.mq_sel == MQ_MULSTEP &&
                    ctrl.b_by_mq0 && ctrl.fn == AL_ADD, "multiply step");
      if (o == OP_DIV)
        expect_true(busy && ctrl.ac_sel == AC_DIVSTEP && ctrl.mq_sel == MQ_DIVSTEP &&
                    ctrl.a_shift && ctrl.fn == AL_SUB, "divide step");
      // a start while busy must not be taken
      if (busy) begin
        op = OP_ADD; start = 1;
        #1;
        expect_true(ctrl.ac_sel != AC_ALU, "start ignored while busy");
        start = 0;
      end
      @(negedge clk);
      lat++;
      if (lat > 3 * W) break;
    end
    expect_true(lat == ((o == OP_MUL || o == OP_DIV) ? W + 1 : 1), $sformatf("latency %0d", lat));
    expect_true(!busy, "idle after done");
  endtask

  initial begin
    start = 0; op = OP_NOP;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++)
      for (int o = 1; o <= 11; o++) run(fp_op_t'(o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
