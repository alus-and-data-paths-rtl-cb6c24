// alu_datapaths_top - the four ALU organisations side by side.
//
//   bs_*  16-bit ALU of four 4-bit register/ALU slices with a carry-lookahead
//         generator (bitslice_alu16): microprogrammed, with a 16 x 16
//         register set and a Q register for double-length shifts.
//   fp_*  accumulator machine with AC, MQ and DR (fixed_point_alu):
//         add, subtract, logic, and multi-cycle multiply and divide.
//   gf_*  ALU of generic function units (gfu_alu): each bit computes
//         arbitrary propagate, kill and result functions given as 4-bit
//         truth tables, with a ripple carry chain.
//   mx_*  brute-force ALU, one circuit per function and a multiplexer
//         (mux_alu).
//   sp_*  ALU split into a logic unit and an arithmetic unit with a 2-to-1
//         multiplexer (split_alu).
// The designs share only clk and rst_n (used by the two clocked ones); they
// exchange no data. See each module for its interface and timing.
module alu_datapaths_top
  import am2901_pkg::*;
  import fpalu_pkg::*;
  import alu_ops_pkg::*;
#(
  parameter int unsigned FP_WIDTH  = 16,
  parameter int unsigned GF_WIDTH  = 8,
  parameter int unsigned MX_WIDTH  = 8,
  parameter int unsigned SP_WIDTH  = 8,
  parameter bit          LOOKAHEAD = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // 16-bit bit-sliced ALU
  input  instr_t              bs_instr,
  input  logic [3:0]          bs_a_addr,
  input  logic [3:0]          bs_b_addr,
  input  logic [15:0]         bs_d,
  input  logic                bs_c_in,
  input  logic                bs_ram0_i,
  input  logic                bs_ram3_i,
  input  logic                bs_q0_i,
  input  logic                bs_q3_i,
  output logic                bs_ram0_o,
  output logic                bs_ram3_o,
  output logic                bs_q0_o,
  output logic                bs_q3_o,
  output logic [15:0]         bs_y,
  output logic                bs_c_out,
  output logic                bs_g_n,
  output logic                bs_p_n,
  output logic                bs_f0,
  output logic                bs_ovr,
  output logic                bs_z,
  // accumulator ALU; the system bus is outside
  input  logic                fp_start,
  input  fp_op_t              fp_op,
  input  logic [FP_WIDTH-1:0] fp_bus_in,
  output logic [FP_WIDTH-1:0] fp_ac,
  output logic [FP_WIDTH-1:0] fp_mq,
  output logic [FP_WIDTH-1:0] fp_dr,
  output logic                fp_flag_z,
  output logic                fp_flag_n,
  output logic                fp_flag_c,
  output logic                fp_flag_v,
  output logic                fp_busy,
  output logic                fp_done,
  // generic-function-unit ALU
  input  logic [3:0]          gf_p_code,
  input  logic [3:0]          gf_k_code,
  input  logic [3:0]          gf_r_code,
  input  logic [GF_WIDTH-1:0] gf_a,
  input  logic [GF_WIDTH-1:0] gf_b,
  input  logic                gf_c_in,
  output logic [GF_WIDTH-1:0] gf_r,
  output logic                gf_c_out,
  // brute-force ALU
  input  logic [MX_WIDTH-1:0] mx_a,
  input  logic [MX_WIDTH-1:0] mx_b,
  input  logic                mx_c_in,
  input  mx_fn_t              mx_fn,
  output logic [MX_WIDTH-1:0] mx_y,
  output logic                mx_c_out,
  // logic unit + arithmetic unit ALU
  input  logic [SP_WIDTH-1:0] sp_a,
  input  logic [SP_WIDTH-1:0] sp_b,
  input  logic                sp_c_in,
  input  logic                sp_s,
  input  lu_fn_t              sp_lfn,
  input  au_fn_t              sp_afn,
  output logic [SP_WIDTH-1:0] sp_y,
  output logic                sp_c_out,
  output logic                sp_ovf
);

  bitslice_alu16 #(.LOOKAHEAD(LOOKAHEAD)) u_bs (
    .clk, .rst_n, .instr(bs_instr), .a_addr(bs_a_addr), .b_addr(bs_b_addr),
    .d(bs_d), .c_in(bs_c_in),
    .ram0_i(bs_ram0_i), .ram3_i(bs_ram3_i), .q0_i(bs_q0_i), .q3_i(bs_q3_i),
    .ram0_o(bs_ram0_o), .ram3_o(bs_ram3_o), .q0_o(bs_q0_o), .q3_o(bs_q3_o),
    .y(bs_y), .c_out(bs_c_out), .g_n(bs_g_n), .p_n(bs_p_n),
    .f0(bs_f0), .ovr(bs_ovr), .z(bs_z)
  );

  fixed_point_alu #(.WIDTH(FP_WIDTH)) u_fp (
    .clk, .rst_n, .start(fp_start), .op(fp_op), .bus_in(fp_bus_in),
    .ac(fp_ac), .mq(fp_mq), .dr(fp_dr),
    .flag_z(fp_flag_z), .flag_n(fp_flag_n), .flag_c(fp_flag_c), .flag_v(fp_flag_v),
    .busy(fp_busy), .done(fp_done)
  );

  gfu_alu #(.WIDTH(GF_WIDTH)) u_gf (
    .p_code(gf_p_code), .k_code(gf_k_code), .r_code(gf_r_code),
    .a(gf_a), .b(gf_b), .c_in(gf_c_in), .r(gf_r), .c_out(gf_c_out)
  );

  mux_alu #(.WIDTH(MX_WIDTH)) u_mx (
    .a(mx_a), .b(mx_b), .c_in(mx_c_in), .fn(mx_fn), .y(mx_y), .c_out(mx_c_out)
  );

  split_alu #(.WIDTH(SP_WIDTH)) u_sp (
    .a(sp_a), .b(sp_b), .c_in(sp_c_in), .s(sp_s), .lfn(sp_lfn), .afn(sp_afn),
    .y(sp_y), .c_out(sp_c_out), .ovf(sp_ovf)
  );

endmodule
