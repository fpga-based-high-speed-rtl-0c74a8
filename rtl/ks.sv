// ks: Kogge-Stone parallel-prefix adder, WIDTH bits (16 by default).
//
// Three stages, as in the classic Kogge-Stone structure:
//   1. pre-processing:  Pi = Ai ^ Bi, Gi = Ai & Bi for every bit;
//   2. carry generation: ceil(log2(WIDTH)) prefix levels. At level l, bit i
//      combines with bit i-2^l. Bits 2^l .. 2^(l+1)-1 use a carry-only (grey)
//      node because their lower group already reaches bit 0; bits above use a
//      full (black) node; bits below 2^l pass through. For a power-of-two
//      WIDTH n this is n*log2(n)-n+1 nodes (49 for 16 bits);
//   3. post-processing: Ci = Gi (group generate of bits i..0),
//      S0 = P0, Si = Pi ^ C(i-1), Cout = C(WIDTH-1).
// There is no carry input (it is 0, as in the 4-bit worked example of the
// design). Purely combinational; ports a, b, sum, cout follow the adder
// instance of the MAC schematic.
module ks
  import mac_pkg::*;
#(
  parameter int unsigned WIDTH = PRODUCT_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  gp_t [WIDTH-1:0]  node;   // node[i]: group (g,p) ending at bit i
  logic [WIDTH-1:0] prop;   // bit propagate, kept for the sum stage
  logic [WIDTH-1:0] carry;  // carry out of bit i

  always_comb begin
    gp_t [WIDTH-1:0] prev;
    // Stage 1: generate and propagate.
    for (int i = 0; i < WIDTH; i++) begin
      prop[i]   = a[i] ^ b[i];
      node[i].g = a[i] & b[i];
      node[i].p = prop[i];
    end
    // Stage 2: prefix tree, one level per iteration, distance 2^l.
    for (int l = 0; l < LEVELS; l++) begin
      prev = node;
      for (int i = 0; i < WIDTH; i++) begin
        if (i >= (2 << l))     node[i] = gp_black(prev[i], prev[i - (1 << l)]);
        else if (i >= (1 << l)) node[i] = gp_grey(prev[i], prev[i - (1 << l)]);
      end
    end
    // Stage 3: carries and sum.
    for (int i = 0; i < WIDTH; i++) begin
      carry[i] = node[i].g;
      sum[i]   = (i == 0) ? prop[i] : prop[i] ^ carry[i - 1];
    end
  end

  assign cout = carry[WIDTH-1];

endmodule
