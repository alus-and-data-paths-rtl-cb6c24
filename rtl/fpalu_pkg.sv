// fpalu_pkg - shared types of the accumulator-style fixed-point ALU.
//
// fp_op_t lists the operations the ALU accepts: the register transfers
//   ADD  AC <- AC + DR        SUB  AC <- AC - DR
//   MUL  AC,MQ <- DR x MQ     DIV  AC,MQ <- MQ / DR
//   AND  AC <- AC & DR        OR   AC <- AC | DR
//   XOR  AC <- AC ^ DR        NOT  AC <- ~AC
// plus loads of AC, MQ and DR from the system bus. The encodings and the
// control-word layout are this design's own.
package fpalu_pkg;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_LDAC = 4'd1,   // AC <- bus
    OP_LDMQ = 4'd2,   // MQ <- bus
    OP_LDDR = 4'd3,   // DR <- bus
    OP_ADD  = 4'd4,
    OP_SUB  = 4'd5,
    OP_MUL  = 4'd6,
    OP_DIV  = 4'd7,
    OP_AND  = 4'd8,
    OP_OR   = 4'd9,
    OP_XOR  = 4'd10,
    OP_NOT  = 4'd11
  } fp_op_t;

  // functions of the parallel adder and logic circuits
  typedef enum logic [2:0] {
    AL_ADD = 3'd0,   // a + b
    AL_SUB = 3'd1,   // a - b, carry out = borrow
    AL_AND = 3'd2,
    AL_OR  = 3'd3,
    AL_XOR = 3'd4,
    AL_NOT = 3'd5    // ~a
  } al_fn_t;

  // what AC loads
  typedef enum logic [2:0] {
    AC_HOLD, AC_ALU, AC_BUS, AC_ZERO, AC_MULSTEP, AC_DIVSTEP
  } ac_sel_t;

  // what MQ loads
  typedef enum logic [1:0] {
    MQ_HOLD, MQ_BUS, MQ_MULSTEP, MQ_DIVSTEP
  } mq_sel_t;

  // control word from the control unit to the data path
  typedef struct packed {
    al_fn_t  fn;
    logic    a_shift;   // adder A input = {AC,MQ} shifted left one place
    logic    b_by_mq0;  // adder B input = DR if MQ[0] else 0
    ac_sel_t ac_sel;
    mq_sel_t mq_sel;
    logic    dr_load;
    logic    flags_we;  // update Z, N, C, V from the adder
    logic    div_chk;   // V <= (DR == 0) at the start of a division
  } fp_ctrl_t;

endpackage
