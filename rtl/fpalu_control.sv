// fpalu_control - control unit of the accumulator ALU.
//
// Accepts one operation when start is high and busy is low. Loads and the
// single-step operations (ADD, SUB, AND, OR, XOR, NOT) take effect at that
// clock edge. MUL and DIV first clear AC, then run WIDTH steps, one per
// clock: a multiply step adds DR to AC when MQ[0] is 1 and shifts AC,MQ one
// place right (shift-and-add, unsigned); a divide step shifts AC,MQ one place
// left and subtracts DR from AC when the remainder allows, setting the new
// quotient bit of MQ (restoring division, unsigned). busy is high during the
// steps and done pulses for one cycle after the last register update, so a
// single-step operation finishes 1 cycle after start and MUL/DIV WIDTH+1
// cycles after it. Assertions check that done never coincides with busy and
// that the step counter stays in range. The lecture notes name the control
// unit and list the register transfers; the algorithms and this timing are
// this design's choice.
module fpalu_control
  import fpalu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  fp_op_t   op,
  output fp_ctrl_t ctrl,
  output logic     busy,
  output logic     done
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV} state_t;

  state_t                     state;
  logic [$clog2(WIDTH+1)-1:0] count;
  logic                       accept;

  assign accept = start && (state == S_IDLE);
  assign busy   = (state != S_IDLE);

  always_comb begin
    ctrl        = '0;
    ctrl.fn     = AL_ADD;
    ctrl.ac_sel = AC_HOLD;
    ctrl.mq_sel = MQ_HOLD;
    unique case (state)
      S_IDLE: if (start) begin
        unique case (op)
          OP_LDAC: ctrl.ac_sel  = AC_BUS;
          OP_LDMQ: ctrl.mq_sel  = MQ_BUS;
          OP_LDDR: ctrl.dr_load = 1'b1;
          OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT: begin
            ctrl.ac_sel   = AC_ALU;
            ctrl.flags_we = 1'b1;
            unique case (op)
              OP_ADD:  ctrl.fn = AL_ADD;
              OP_SUB:  ctrl.fn = AL_SUB;
              OP_AND:  ctrl.fn = AL_AND;
              OP_OR:   ctrl.fn = AL_OR;
              OP_XOR:  ctrl.fn = AL_XOR;
              default: ctrl.fn = AL_NOT;
            endcase
          end
          OP_MUL: ctrl.ac_sel = AC_ZERO;
          OP_DIV: begin ctrl.ac_sel = AC_ZERO; ctrl.div_chk = 1'b1; end
          default: ;
        endcase
      end
      S_MUL: begin
        ctrl.fn       = AL_ADD;
        ctrl.b_by_mq0 = 1'b1;
        ctrl.ac_sel   = AC_MULSTEP;
        ctrl.mq_sel   = MQ_MULSTEP;
      end
      S_DIV: begin
        ctrl.fn      = AL_SUB;
        ctrl.a_shift = 1'b1;
        ctrl.ac_sel  = AC_DIVSTEP;
        ctrl.mq_sel  = MQ_DIVSTEP;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          if (op == OP_MUL || op == OP_DIV) begin
            state <= (op == OP_MUL) ? S_MUL : S_DIV;
            count <= ($bits(count))'(WIDTH);
          end else begin
            done <= 1'b1;
          end
        end
        default: begin
          count <= count - 1'b1;
          if (count == ($bits(count))'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  // handshake rules: done only when idle again, and a multi-step operation
  // never lasts longer than WIDTH step cycles
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy |-> (count != '0 && count <= ($bits(count))'(WIDTH)));

endmodule
