// fixed_point_alu - a basic fixed-point ALU with accumulator AC, multiplier-
// quotient register MQ and data register DR.
//
// Operations (unsigned for MUL and DIV, two's complement flags for ADD/SUB):
//   ADD AC <- AC + DR, SUB AC <- AC - DR, AND/OR/XOR AC <- AC op DR,
//   NOT AC <- ~AC, MUL AC,MQ <- DR x MQ (AC holds the high half),
//   DIV AC,MQ <- MQ / DR (MQ holds the quotient, AC the remainder),
// and LDAC/LDMQ/LDDR load a register from the system bus input. The three
// registers are visible on ac/mq/dr, the bus side of the registers. The
// parallel adder and logic circuits do all arithmetic, including each step of
// multiplication and division; the control unit sequences them.
//
// Flags: Z (zero), N (sign), C (carry; borrow after SUB) and V (overflow) are
// updated by ADD, SUB, AND, OR, XOR and NOT; a division sets V when DR is
// zero (the quotient is then all ones and the remainder the dividend).
// Timing: see fpalu_control; start is taken when busy is low, done pulses
// when the result is in the registers. The register organisation and the
// transfers follow the lecture notes; word width, flag set, encodings,
// algorithms and handshake are this design's choice.
module fixed_point_alu
  import fpalu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  fp_op_t           op,
  input  logic [WIDTH-1:0] bus_in,
  output logic [WIDTH-1:0] ac,
  output logic [WIDTH-1:0] mq,
  output logic [WIDTH-1:0] dr,
  output logic             flag_z,
  output logic             flag_n,
  output logic             flag_c,
  output logic             flag_v,
  output logic             busy,
  output logic             done
);

  fp_ctrl_t         ctrl;
  logic [WIDTH-1:0] al_a, al_b, al_y, ac_sh;
  logic             al_c, al_v, al_z, al_n, fits;

  fpalu_control #(.WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n, .start, .op, .ctrl, .busy, .done
  );

  // divide step: AC with the top bit of MQ shifted in
  assign ac_sh = {ac[WIDTH-2:0], mq[WIDTH-1]};

  assign al_a = ctrl.a_shift ? ac_sh : ac;
  assign al_b = (ctrl.b_by_mq0 && !mq[0]) ? '0 : dr;

  fpalu_adder_logic #(.WIDTH(WIDTH)) u_al (
    .a(al_a), .b(al_b), .fn(ctrl.fn),
    .y(al_y), .carry(al_c), .ovf(al_v), .zero(al_z), .neg(al_n)
  );

  // the shifted partial remainder (WIDTH+1 bits with the bit shifted out of
  // AC) is at least DR exactly when that bit is set or no borrow occurred
  assign fits = ac[WIDTH-1] | ~al_c;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ac     <= '0;
      mq     <= '0;
      dr     <= '0;
      flag_z <= 1'b0;
      flag_n <= 1'b0;
      flag_c <= 1'b0;
      flag_v <= 1'b0;
    end else begin
      unique case (ctrl.ac_sel)
        AC_ALU:     ac <= al_y;
        AC_BUS:     ac <= bus_in;
        AC_ZERO:    ac <= '0;
        AC_MULSTEP: ac <= {al_c, al_y[WIDTH-1:1]};
        AC_DIVSTEP: ac <= fits ? al_y : ac_sh;
        default:    ;
      endcase
      unique case (ctrl.mq_sel)
        MQ_BUS:     mq <= bus_in;
        MQ_MULSTEP: mq <= {al_y[0], mq[WIDTH-1:1]};
        MQ_DIVSTEP: mq <= {mq[WIDTH-2:0], fits};
        default:    ;
      endcase
      if (ctrl.dr_load) dr <= bus_in;
      if (ctrl.flags_we) begin
        flag_z <= al_z;
        flag_n <= al_n;
        flag_c <= al_c;
        flag_v <= al_v;
      end
      if (ctrl.div_chk) flag_v <= (dr == '0);
    end
  end

endmodule
