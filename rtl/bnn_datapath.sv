// Binary MAC array with partial-sum scaling accumulators (top level).
//
// M output lanes share one T-bit input tile x_i. Lane m XNORs x_i with its own
// weight row w_i[m], counts the matches in an adder tree (partial sum, 0..T)
// and accumulates the scaled, rounded partial sum in an ACC_W-bit ordinary or
// saturating accumulator. A dot product of any length N is fed as
// ceil(N/T) tiles, first_i on the first and last_i on the last; the lane
// then holds round(p_1/D) + ... + round(p_k/D) (mod 2^ACC_W, or clipped),
// D = T / 2^PSUM_B. The layer output is y = 2*D*acc - N, a conversion that
// the next layer's input quantisation absorbs and that is not built here.
//
// Defaults: 64x64 array (4096 XNORs, 64 adder trees), 4-bit saturating
// accumulator, 3-bit effective partial sum (D = 8). Setting PSUM_B = log2(T)
// gives unscaled accumulation (D = 1), e.g. a 16-bit ordinary baseline.
// RUNTIME_SCALE = 1 replaces the fixed bit selection by shifters so that b
// is read from psum_b_i (1..log2 T) per dot product, for running networks
// with different optimal b; by default psum_b_i is ignored.
//
// Timing: one tile per cycle, no stalls. The popcount is combinational and
// the only registers are the accumulators, so acc_o reflects a tile one
// cycle after it is presented; done_o pulses one cycle after the last tile.
// ovf_o[m] reports that lane m wrapped or saturated during the current sum.
// The weight and activation buffers and the layer sequencer that drive these
// ports are outside this module.
//
// The array organisation, its 64x64 size and the accumulator/partial-sum
// widths follow the method; the handshake, the single-cycle (unpipelined)
// lane, the reset and ovf_o are this design's own choices.
module bnn_datapath
  import bnn_pkg::*;
#(
  parameter int unsigned T      = bnn_pkg::TILE_SIZE,
  parameter int unsigned M      = bnn_pkg::NUM_LANES,
  parameter int unsigned ACC_W  = bnn_pkg::ACC_WIDTH,
  parameter int unsigned PSUM_B = bnn_pkg::PSUM_BITS,
  parameter acc_mode_e   MODE   = bnn_pkg::ACC_MODE,
  parameter bit          RUNTIME_SCALE = 1'b0
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic                      valid_i,
  input  logic                      first_i,
  input  logic                      last_i,
  input  logic [$clog2($clog2(T)+1)-1:0] psum_b_i, // b, RUNTIME_SCALE only
  input  logic [T-1:0]              x_i,   // shared input tile
  input  logic [M-1:0][T-1:0]       w_i,   // one weight row per lane
  output logic [M-1:0][ACC_W-1:0]   acc_o, // accumulators
  output logic                      done_o,
  output logic [M-1:0]              ovf_o
);

  localparam int unsigned PW = $clog2(T + 1);

  logic [M-1:0] lane_done;

  for (genvar m = 0; m < M; m++) begin : g_lane
    logic [PW-1:0] psum;

    xnor_popcount #(.T(T)) u_xp (
      .x_i    (x_i),
      .w_i    (w_i[m]),
      .psum_o (psum)
    );

    scaling_accumulator #(
      .T      (T),
      .ACC_W  (ACC_W),
      .PSUM_B (PSUM_B),
      .MODE   (MODE),
      .RUNTIME_SCALE (RUNTIME_SCALE)
    ) u_acc (
      .clk_i   (clk_i),
      .rst_ni  (rst_ni),
      .valid_i (valid_i),
      .first_i (first_i),
      .last_i  (last_i),
      .psum_i  (psum),
      .psum_b_i(psum_b_i),
      .acc_o   (acc_o[m]),
      .done_o  (lane_done[m]),
      .ovf_o   (ovf_o[m])
    );
  end

  // Handshake rules: after reset or after a last tile, the next valid tile
  // must open a new dot product with first_i; with RUNTIME_SCALE, b must be
  // in 1..log2(T) and may change only on a first tile.
  localparam int unsigned BW = $clog2($clog2(T) + 1);

  logic          in_sum_q;
  logic [BW-1:0] psum_b_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      in_sum_q <= 1'b0;
      psum_b_q <= '0;
    end else if (valid_i) begin
      a_first_after_last : assert (in_sum_q || first_i)
        else $error("bnn_datapath: tile without first_i outside a dot product");
      if (RUNTIME_SCALE) begin
        a_b_range : assert (psum_b_i != '0 && 32'(psum_b_i) <= $clog2(T))
          else $error("bnn_datapath: psum_b_i out of range");
        a_b_stable : assert (first_i || psum_b_i == psum_b_q)
          else $error("bnn_datapath: psum_b_i changed inside a dot product");
      end
      in_sum_q <= !last_i;
      psum_b_q <= psum_b_i;
    end
  end

  // All lanes run in lockstep, so their done flags are equal; the AND keeps
  // every lane's flag in use.
  assign done_o = &lane_done;

endmodule
