// mac_pkg: types and constants shared by the Kogge-Stone multiplier and the
// multiply-accumulate unit.
//
// The operand width of 8 bits and the 16-bit product/accumulator width are the
// sizes of the published design. gp_t is the (generate, propagate) pair that
// every node of the Kogge-Stone prefix tree works on; gp_black() is the prefix
// operator of a full ("black") node and gp_grey() the carry-only ("grey") node
// used where the lower group already reaches bit 0.
package mac_pkg;

  localparam int unsigned OPERAND_W = 8;
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } gp_t;

  // Full prefix node: G = Gi | (Pi & Gprev), P = Pi & Pprev.
  function automatic gp_t gp_black(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Carry-only prefix node: G = Gi | (Pi & Gprev). The group now spans down to
  // bit 0, so its propagate is never consumed and is returned as 0.
  function automatic gp_t gp_grey(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = 1'b0;
    return r;
  endfunction

endpackage
