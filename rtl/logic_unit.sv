// logic_unit - the logic half of the split ALU: AND, OR, XOR, NOT A, NOT B,
// A, B or zero of two WIDTH-bit words, chosen by a 3-bit code
// (alu_ops_pkg::lu_fn_t). Combinational.
module logic_unit
  import alu_ops_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  lu_fn_t           fn,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (fn)
      LU_AND:  y = a & b;
      LU_OR:   y = a | b;
      LU_XOR:  y = a ^ b;
      LU_NOTA: y = ~a;
      LU_NOTB: y = ~b;
      LU_A:    y = a;
      LU_B:    y = b;
      default: y = '0;
    endcase
  end

endmodule
