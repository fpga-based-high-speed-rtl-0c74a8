// pp_gen: partial-product generator of an N x N unsigned multiplier
// (phase 1 of the multiplication).
//
// Row i is the multiplicand x ANDed with multiplier bit y[i] and shifted left
// by i, zero-filled to 2N bits: pp[i][j+i] = y[i] & x[j]. With N = 8 this is the
// 8 rows Pa0..Pa7 that the Kogge-Stone adder tree then sums. Combinational.
module pp_gen
  import mac_pkg::*;
#(
  parameter int unsigned N = OPERAND_W
) (
  input  logic [N-1:0]            x,  // multiplicand
  input  logic [N-1:0]            y,  // multiplier
  output logic [N-1:0][2*N-1:0]   pp  // pp[i]: row i, already shifted
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = '0;
      for (int j = 0; j < N; j++) begin
        pp[i][i+j] = x[j] & y[i];
      end
    end
  end

endmodule
