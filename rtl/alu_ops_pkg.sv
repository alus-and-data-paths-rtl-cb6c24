// alu_ops_pkg - function codes of the multiplexer-style ALUs (the
// brute-force ALU and the ALU split into a logic unit and an arithmetic
// unit). The operations come from the list of functions an ALU is expected
// to perform; the numeric codes are this design's own.
package alu_ops_pkg;

  // brute-force ALU: one circuit per function, picked by an N-to-1 mux
  typedef enum logic [2:0] {
    MX_AND  = 3'd0,
    MX_OR   = 3'd1,
    MX_XOR  = 3'd2,
    MX_NOTA = 3'd3,
    MX_ADD  = 3'd4,   // A + B + Cin through the full adders
    MX_ZERO = 3'd5    // codes 5..7 give zero
  } mx_fn_t;

  // logic unit
  typedef enum logic [2:0] {
    LU_AND  = 3'd0,
    LU_OR   = 3'd1,
    LU_XOR  = 3'd2,
    LU_NOTA = 3'd3,
    LU_NOTB = 3'd4,
    LU_A    = 3'd5,
    LU_B    = 3'd6,
    LU_ZERO = 3'd7
  } lu_fn_t;

  // arithmetic unit; for the subtracting functions c_in is a borrow in and
  // c_out a borrow out
  typedef enum logic [3:0] {
    AU_ADD   = 4'd0,   // A + B
    AU_ADDC  = 4'd1,   // A + B + Cin
    AU_SUB   = 4'd2,   // A - B
    AU_SUBB  = 4'd3,   // A - B - Cin
    AU_RSUB  = 4'd4,   // B - A
    AU_RSUBB = 4'd5,   // B - A - Cin
    AU_NEGA  = 4'd6,   // -A
    AU_NEGB  = 4'd7,   // -B
    AU_INCA  = 4'd8,   // A + 1
    AU_INCB  = 4'd9,   // B + 1
    AU_DECA  = 4'd10,  // A - 1
    AU_DECB  = 4'd11   // B - 1
  } au_fn_t;

endpackage
