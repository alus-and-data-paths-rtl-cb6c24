// arith_unit - the arithmetic half of the split ALU.
//
// One WIDTH-bit adder x + y + ci does all twelve functions of
// alu_ops_pkg::au_fn_t: the operand multiplexers pick A, B, their
// complements, zero or all ones, and the carry in is 0, 1, c_in or NOT c_in.
// Subtraction X - Y - borrow is computed as X + ~Y + ~borrow, and the adder's
// carry is inverted so that c_out is then a borrow out; for the adding
// functions c_out is the carry out. ovf is two's complement overflow of
// the function's result. Codes 12..15 give zero with no carry. Combinational.
module arith_unit
  import alu_ops_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  input  au_fn_t           fn,
  output logic [WIDTH-1:0] y,
  output logic             c_out,
  output logic             ovf
);

  logic [WIDTH-1:0] x, w;
  logic             ci, sub, valid;
  logic [WIDTH:0]   sum;

  always_comb begin
    x = a; w = b; ci = 1'b0; sub = 1'b0; valid = 1'b1;
    unique case (fn)
      AU_ADD:   ;
      AU_ADDC:  ci = c_in;
      AU_SUB:   begin w = ~b; ci = 1'b1;  sub = 1'b1; end
      AU_SUBB:  begin w = ~b; ci = ~c_in; sub = 1'b1; end
      AU_RSUB:  begin x = b; w = ~a; ci = 1'b1;  sub = 1'b1; end
      AU_RSUBB: begin x = b; w = ~a; ci = ~c_in; sub = 1'b1; end
      AU_NEGA:  begin x = '0; w = ~a; ci = 1'b1; sub = 1'b1; end
      AU_NEGB:  begin x = '0; w = ~b; ci = 1'b1; sub = 1'b1; end
      AU_INCA:  begin w = '0; ci = 1'b1; end
      AU_INCB:  begin x = b; w = '0; ci = 1'b1; end
      AU_DECA:  begin w = '1; sub = 1'b1; end
      AU_DECB:  begin x = b; w = '1; sub = 1'b1; end
      default:  begin x = '0; w = '0; valid = 1'b0; end
    endcase
  end

  assign sum   = {1'b0, x} + {1'b0, w} + {{WIDTH{1'b0}}, ci};
  assign y     = sum[WIDTH-1:0];
  assign c_out = valid & (sum[WIDTH] ^ sub);
  assign ovf   = (x[WIDTH-1] == w[WIDTH-1]) && (y[WIDTH-1] != x[WIDTH-1]);

endmodule
