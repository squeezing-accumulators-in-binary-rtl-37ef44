// Popcount adder tree: counts the ones in an N-bit vector.
//
// The input is padded with zeros to NP = 2^L bits, L = ceil(log2 N), and
// summed pairwise in L levels: level l holds NP/2^l counts of l+1 bits, each
// the sum of two counts of the level below. This is the balanced adder tree
// that follows the XNOR row of each lane of the binary MAC array, with the
// narrowest adder that each level allows. Purely combinational; count_o is
// $clog2(N+1) bits wide so that the all-ones input (count N) is
// representable. That the popcount is an adder tree follows the method; its
// exact shape is this design's own choice.
module popcount_tree #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]           bits_i,
  output logic [$clog2(N+1)-1:0] count_o
);

  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned NP = 2 ** L;

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [l:0] cnt [NP >> l];

    for (genvar i = 0; i < (NP >> l); i++) begin : g_node
      if (l == 0) begin : g_leaf
        if (i < N) begin : g_bit
          assign cnt[i] = bits_i[i];
        end else begin : g_pad
          assign cnt[i] = 1'b0;
        end
      end else begin : g_add
        assign cnt[i] = {1'b0, g_lvl[l-1].cnt[2*i]} + {1'b0, g_lvl[l-1].cnt[2*i+1]};
      end
    end
  end

  assign count_o = CW'(g_lvl[L].cnt[0]);

endmodule
