// am2901_ram - the 16 x 4-bit register set of the ALU slice.
//
// Two read ports addressed by A and B, read combinationally, and one write
// port that writes wdata at address B on the rising clock edge when we is
// high. A write and a read of the same word in one cycle return the old
// value; the new one is seen from the next cycle. The size follows the
// lecture notes; the edge-triggered write is this design's choice.
module am2901_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    a_addr,
  input  logic [AW-1:0]    b_addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] a_data,
  output logic [WIDTH-1:0] b_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[b_addr] <= wdata;
  end

  assign a_data = mem[a_addr];
  assign b_data = mem[b_addr];

endmodule
