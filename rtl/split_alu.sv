// split_alu - an ALU made of a logic unit and an arithmetic unit working side
// by side on the same operands, with a 2-to-1 multiplexer, selected by s,
// choosing which result leaves the ALU (s = 0: logic, s = 1: arithmetic).
// c_out and ovf come from the arithmetic unit and are forced to 0 when the
// logic result is chosen. Combinational. The structure follows the lecture
// notes; the function lists of the two units are taken from the lecture
// notes' list of ALU operations, and the codes are this design's own.
module split_alu
  import alu_ops_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  input  logic             s,
  input  lu_fn_t           lfn,
  input  au_fn_t           afn,
  output logic [WIDTH-1:0] y,
  output logic             c_out,
  output logic             ovf
);

  logic [WIDTH-1:0] ly, ay;
  logic             ac, av;

  logic_unit #(.WIDTH(WIDTH)) u_lu (.a, .b, .fn(lfn), .y(ly));
  arith_unit #(.WIDTH(WIDTH)) u_au (.a, .b, .c_in, .fn(afn), .y(ay), .c_out(ac), .ovf(av));

  assign y     = s ? ay : ly;
  assign c_out = s & ac;
  assign ovf   = s & av;

endmodule
