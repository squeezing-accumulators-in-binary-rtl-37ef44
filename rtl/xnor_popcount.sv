// XNOR-popcount lane: the binary equivalent of one row of multipliers
// followed by an adder tree.
//
// With +1 encoded as 1 and -1 as 0, the product of two binary values is their
// XNOR, so the dot product of T weight/activation pairs is
// 2*popcount(XNOR(w, x)) - T. This lane produces only the popcount, the
// partial sum p in 0..T; the affine correction 2*sum(p) - N is left to the
// stage after accumulation. Purely combinational: T XNOR gates and a
// popcount_tree. psum_o is $clog2(T+1) bits (7 bits for T = 64). The lane
// structure and T = 64 follow the method; the 1 = +1 encoding is implied by it.
module xnor_popcount #(
  parameter int unsigned T = bnn_pkg::TILE_SIZE
) (
  input  logic [T-1:0]           x_i,    // activations of one tile
  input  logic [T-1:0]           w_i,    // weights of one tile
  output logic [$clog2(T+1)-1:0] psum_o  // partial sum p
);

  logic [T-1:0] match;

  assign match = ~(x_i ^ w_i);

  popcount_tree #(.N(T)) u_tree (.bits_i(match), .count_o(psum_o));

endmodule
