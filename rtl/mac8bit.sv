// mac8bit: 8-bit multiply-accumulate unit, z <= z + a*b on every clock.
//
// Datapath: the Kogge-Stone array multiplier (mul8bit) forms the 16-bit
// product a*b; a 16-bit Kogge-Stone adder (ks) adds it to the accumulator
// output; the sum is loaded into the PIPO accumulator register (pipo1), whose
// output is both z and the adder's second operand. This is the structure of
// the MAC schematic (instances a1 mul8bit, a2 ks, a3 pipo1).
//
// Timing: combinational from a, b through multiplier and adder to the register;
// z changes only at a rising clock edge, so z after edge k holds the sum of the
// products presented before edges 1..k since reset. rst (active high,
// synchronous, this design's choice) clears the accumulator.
//
// Width: the accumulator is 16 bits, like z on the MAC symbol, and accumulates
// modulo 2^16. The adder's carry out is left open on purpose: the symbol has no
// carry or overflow pin, and a wider (2N+1-bit) accumulator would change that
// interface.
module mac8bit
  import mac_pkg::*;
#(
  parameter int unsigned N = OPERAND_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a,  // multiplier operand
  input  logic [N-1:0]   b,  // multiplicand operand
  output logic [2*N-1:0] z   // accumulator
);

  logic [2*N-1:0] product;
  logic [2*N-1:0] acc_next;

  mul8bit #(.N(N)) a1 (
    .x(a),
    .y(b),
    .z(product)
  );

  ks #(.WIDTH(2*N)) a2 (
    .a   (product),
    .b   (z),
    .sum (acc_next),
    .cout()
  );

  pipo1 #(.WIDTH(2*N)) a3 (
    .clk (clk),
    .rst (rst),
    .din (acc_next),
    .dout(z)
  );

endmodule
