// mux_alu - the brute-force ALU: every function has its own circuit and an
// N-to-1 multiplexer picks one result.
//
// Per bit there is an AND, an OR and an XOR of A and B, the complement of A,
// and a full adder; the full adders are chained into a ripple-carry adder
// from c_in to c_out. The 3-bit function code selects the result (see
// alu_ops_pkg::mx_fn_t; codes 5 to 7 give zero). c_out is the adder's carry
// whatever the function. Combinational. The set of circuits follows the
// lecture notes' drawing; the width, the codes and reading the one-input
// element as NOT A are this design's choice.
module mux_alu
  import alu_ops_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  input  mx_fn_t           fn,
  output logic [WIDTH-1:0] y,
  output logic             c_out
);

  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] sum;

  assign c[0] = c_in;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1]   = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
  assign c_out = c[WIDTH];

  always_comb begin
    unique case (fn)
      MX_AND:  y = a & b;
      MX_OR:   y = a | b;
      MX_XOR:  y = a ^ b;
      MX_NOTA: y = ~a;
      MX_ADD:  y = sum;
      default: y = '0;
    endcase
  end

endmodule
