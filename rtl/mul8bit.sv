// mul8bit: N x N unsigned multiplier whose partial products are summed by
// Kogge-Stone adders (N = 8 by default, a 16-bit product).
//
// Phase 1 (pp_gen) forms N shifted partial-product rows. Phase 2 adds them in
// pairs with 2N-bit Kogge-Stone adders: row 0 + row 1, row 2 + row 3, ...,
// then the pair sums in pairs again, halving the row count each level; the
// last adder is the final addition (phase 3). For N = 8 that is 4 + 2 + 1 = 7
// adders in log2(8) = 3 levels. Every intermediate sum is below 2^(2N), so the
// adders' carry outputs are always 0 and are left open.
// Ports x, y, z are those of the stand-alone multiplier symbol. Combinational:
// z is valid one adder-tree delay after x and y. N must be a power of two.
module mul8bit
  import mac_pkg::*;
#(
  parameter int unsigned N = OPERAND_W
) (
  input  logic [N-1:0]   x,  // multiplicand
  input  logic [N-1:0]   y,  // multiplier
  output logic [2*N-1:0] z   // product x*y
);

  localparam int unsigned W      = 2 * N;
  localparam int unsigned LEVELS = $clog2(N);

  if ((N < 2) || ((N & (N - 1)) != 0)) begin : g_check
    $error("mul8bit: N must be a power of two, at least 2");
  end

  logic [N-1:0][W-1:0] pp;

  pp_gen #(.N(N)) u_pp (
    .x (x),
    .y (y),
    .pp(pp)
  );

  // g_level[l].rows: the N >> (l+1) row sums produced by addition level l.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned OUT_ROWS = N >> (l + 1);
    logic [OUT_ROWS-1:0][W-1:0] rows;
    logic [2*OUT_ROWS-1:0][W-1:0] ins;
    if (l == 0) begin : g_first
      assign ins = pp;
    end else begin : g_next
      assign ins = g_level[l-1].rows;
    end
    for (genvar k = 0; k < OUT_ROWS; k++) begin : g_add
      ks #(.WIDTH(W)) u_ks (
        .a   (ins[2*k]),
        .b   (ins[2*k+1]),
        .sum (rows[k]),
        .cout()
      );
    end
  end

  assign z = g_level[LEVELS-1].rows[0];

endmodule
