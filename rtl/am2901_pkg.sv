// am2901_pkg - shared types of the 4-bit bit-slice ALU (2901 style) and the
// 16-bit array built from it.
//
// The 9-bit microinstruction has three 3-bit fields: the ALU source field
// I_S (which operands feed the R and S ALU inputs), the ALU function field
// I_F and the destination field I_D (what is written to the register set and
// the Q register, what appears on Y, and which way the shifters move). The
// field codes below are the 3-digit codes of the instruction tables, read as
// binary numbers. The instruction word packs them as {I_D, I_F, I_S}; this
// packing is this design's choice.
package am2901_pkg;

  // ALU source operand pairs (R, S)
  typedef enum logic [2:0] {
    SRC_AQ = 3'b000,  // R = RAM(A), S = Q
    SRC_AB = 3'b001,  // R = RAM(A), S = RAM(B)
    SRC_ZQ = 3'b010,  // R = 0,      S = Q
    SRC_ZB = 3'b011,  // R = 0,      S = RAM(B)
    SRC_ZA = 3'b100,  // R = 0,      S = RAM(A)
    SRC_DA = 3'b101,  // R = D,      S = RAM(A)
    SRC_DQ = 3'b110,  // R = D,      S = Q
    SRC_DZ = 3'b111   // R = D,      S = 0
  } src_t;

  // ALU functions
  typedef enum logic [2:0] {
    FN_ADD   = 3'b000,  // R + S + Cin
    FN_SUBR  = 3'b001,  // S - R - Cin   (Cin is a borrow)
    FN_SUBS  = 3'b010,  // R - S - Cin   (Cin is a borrow)
    FN_OR    = 3'b011,  // R | S
    FN_AND   = 3'b100,  // R & S
    FN_NOTRS = 3'b101,  // ~R & S
    FN_EXOR  = 3'b110,  // R ^ S
    FN_EXNOR = 3'b111   // R ^ ~S
  } fn_t;

  // Destinations and shifts
  typedef enum logic [2:0] {
    DST_QREG  = 3'b000,  // Y = F, Q <= F
    DST_NOP   = 3'b001,  // Y = F, nothing written
    DST_RAMA  = 3'b010,  // Y = RAM(A), RAM(B) <= F
    DST_RAMF  = 3'b011,  // Y = F, RAM(B) <= F
    DST_RAMQD = 3'b100,  // Y = F, RAM(B) <= F/2, Q <= Q/2
    DST_RAMD  = 3'b101,  // Y = F, RAM(B) <= F/2
    DST_RAMQU = 3'b110,  // Y = F, RAM(B) <= 2F,  Q <= 2Q
    DST_RAMU  = 3'b111   // Y = F, RAM(B) <= 2F
  } dst_t;

  typedef struct packed {
    dst_t dst;
    fn_t  fn;
    src_t src;
  } instr_t;

  // Shifter modes, shared by the RAM shifter and the Q shifter
  typedef enum logic [1:0] {
    SH_PASS = 2'd0,
    SH_DOWN = 2'd1,  // divide by 2: towards the least significant bit
    SH_UP   = 2'd2   // multiply by 2: towards the most significant bit
  } shift_t;

  // S operand select
  typedef enum logic [1:0] {S_A = 2'd0, S_B = 2'd1, S_Q = 2'd2, S_Z = 2'd3} ssel_t;

  // Decoded controls of one slice
  typedef struct packed {
    logic   r_is_a;    // R = RAM(A)
    logic   r_is_d;    // R = D (else 0 unless r_is_a)
    ssel_t  s_sel;     // RAM(A), RAM(B), Q or zero
    fn_t    fn;
    logic   ram_we;
    shift_t ram_shift;
    logic   q_we;
    shift_t q_shift;   // SH_PASS loads F, otherwise shifts Q
    logic   y_is_a;    // Y = RAM(A) instead of F
  } ctrl_t;

endpackage
