// am2901_slice - one 4-bit slice of a bit-sliced ALU in the style of the
// 2901.
//
// Structure, as drawn in the lecture notes: a 16 x 4 register set read at
// addresses A and B and written at B; a Q register; a source multiplexer for
// each ALU input (R from RAM(A), D or 0; S from RAM(A), RAM(B), Q or 0); the
// 4-bit arithmetic-logic circuit; a RAM shifter in front of the register
// set's write port and a Q shifter in front of the Q register; and an output
// multiplexer that puts either F or RAM(A) on Y. A decoder turns the 9-bit
// instruction into the selects.
//
// Timing: everything up to Y and the flags is combinational within the cycle;
// the register set and the Q register are written on the rising edge of clk.
// The shift pins are split into inputs and outputs (ram0_*/q0_* at the most
// significant end, ram3_*/q3_* at the least significant end, as printed, with
// bit 0 the most significant). rst_n clears the Q register, which the lecture
// notes do not mention; the register set is not reset.
module am2901_slice
  import am2901_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  instr_t     instr,
  input  logic [3:0] a_addr,
  input  logic [3:0] b_addr,
  input  logic [3:0] d,
  input  logic       c_in,
  input  logic       ram0_i,   // shift-down input at the top of the RAM shifter
  input  logic       ram3_i,   // shift-up input at the bottom of the RAM shifter
  input  logic       q0_i,
  input  logic       q3_i,
  output logic       ram0_o,   // top bit of F, shifted out on shift-up
  output logic       ram3_o,   // bottom bit of F, shifted out on shift-down
  output logic       q0_o,
  output logic       q3_o,
  output logic [3:0] y,
  output logic       c_out,
  output logic       g_n,
  output logic       p_n,
  output logic       f0,
  output logic       ovr,
  output logic       z
);

  ctrl_t      ctrl;
  logic [3:0] a_data, b_data, q, r, s, f, ram_wdata, q_next, q_src;

  am2901_decoder u_dec (.instr, .ctrl);

  am2901_ram u_ram (
    .clk, .a_addr, .b_addr,
    .we(ctrl.ram_we), .wdata(ram_wdata),
    .a_data, .b_data
  );

  // source multiplexers
  always_comb begin
    if (ctrl.r_is_a)      r = a_data;
    else if (ctrl.r_is_d) r = d;
    else                  r = '0;
    unique case (ctrl.s_sel)
      S_A:     s = a_data;
      S_B:     s = b_data;
      S_Q:     s = q;
      default: s = '0;
    endcase
  end

  am2901_alu u_alu (
    .r, .s, .fn(ctrl.fn), .c_in,
    .f, .c_out, .g_n, .p_n, .f0, .ovr, .z
  );

  am2901_shifter u_ram_sh (
    .d(f), .mode(ctrl.ram_shift), .msb_i(ram0_i), .lsb_i(ram3_i),
    .y(ram_wdata), .msb_o(ram0_o), .lsb_o(ram3_o)
  );

  // the Q shifter loads F straight, or shifts the present Q
  assign q_src = (ctrl.q_shift == SH_PASS) ? f : q;

  am2901_shifter u_q_sh (
    .d(q_src), .mode(ctrl.q_shift), .msb_i(q0_i), .lsb_i(q3_i),
    .y(q_next), .msb_o(q0_o), .lsb_o(q3_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         q <= '0;
    else if (ctrl.q_we) q <= q_next;
  end

  assign y = ctrl.y_is_a ? a_data : f;

endmodule
