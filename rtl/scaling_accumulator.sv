// Partial-sum scaling accumulator with zero-overhead rounding.
//
// A partial sum p (0..T, PW = $clog2(T+1) bits) is divided by the scale
// factor D = T / 2^PSUM_B, rounded to nearest, and added to an ACC_W-bit
// accumulator. Because T and D are powers of two, the division is pure bit
// selection: the low C = log2(T) - PSUM_B bits are dropped and p[PW-1:C] is
// the addend. Rounding (half up) costs no adder: the most significant
// dropped bit, p[C-1], enters the accumulator adder as its carry in. No clip
// is needed before the adder since D >= 1. The scaling back (multiply by D)
// is not done here; it belongs to the next layer's input quantisation.
// With RUNTIME_SCALE = 1 the precision b is read from psum_b_i instead of
// the parameter PSUM_B, and the bit selection becomes a shifter (see
// psum_scaler); b must then stay constant for the whole of a sum.
//
// Interface and timing (the handshake is this design's own choice):
//   valid_i  - psum_i is a tile to accumulate this cycle.
//   first_i  - with valid_i: the tile starts a new sum (accumulator base 0),
//              so back-to-back dot products need no idle cycle.
//   last_i   - with valid_i: the tile ends the sum.
//   psum_b_i - b, used only when RUNTIME_SCALE = 1 (ignored otherwise).
//   acc_o    - the accumulator register; one cycle after a valid tile it
//              holds the sum including that tile.
//   done_o   - one-cycle pulse, one cycle after the last tile: acc_o is the
//              finished scaled sum.
//   ovf_o    - set with acc_o when some addition of the current sum did not
//              fit in ACC_W bits (wrapped or saturated); cleared by first_i.
// Asynchronous active-low reset clears acc_o, done_o and ovf_o.
module scaling_accumulator
  import bnn_pkg::*;
#(
  parameter int unsigned T      = bnn_pkg::TILE_SIZE,
  parameter int unsigned ACC_W  = bnn_pkg::ACC_WIDTH,
  parameter int unsigned PSUM_B = bnn_pkg::PSUM_BITS,
  parameter acc_mode_e   MODE   = bnn_pkg::ACC_MODE,
  parameter bit          RUNTIME_SCALE = 1'b0
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   valid_i,
  input  logic                   first_i,
  input  logic                   last_i,
  input  logic [$clog2(T+1)-1:0] psum_i,
  input  logic [$clog2($clog2(T)+1)-1:0] psum_b_i, // b, RUNTIME_SCALE only
  output logic [ACC_W-1:0]       acc_o,
  output logic                   done_o,
  output logic                   ovf_o
);

  localparam int unsigned PW = $clog2(T + 1);                  // psum width
  localparam int unsigned C  = $clog2(T) - PSUM_B;              // bits dropped
  localparam int unsigned SW = RUNTIME_SCALE ? PW : PW - C;     // scaled width

  logic [SW-1:0]    scaled;
  logic             round_bit;
  logic [ACC_W-1:0] base;
  logic [ACC_W-1:0] acc_next;
  logic             add_ovf;

  psum_scaler #(
    .T       (T),
    .PSUM_B  (PSUM_B),
    .RUNTIME (RUNTIME_SCALE)
  ) u_scaler (
    .psum_i   (psum_i),
    .psum_b_i (psum_b_i),
    .scaled_o (scaled),
    .round_o  (round_bit)
  );

  assign base = first_i ? '0 : acc_o;

  acc_adder #(
    .ACC_W (ACC_W),
    .IN_W  (SW),
    .MODE  (MODE)
  ) u_adder (
    .acc_i      (base),
    .addend_i   (scaled),
    .cin_i      (round_bit),
    .sum_o      (acc_next),
    .overflow_o (add_ovf)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      acc_o  <= '0;
      done_o <= 1'b0;
      ovf_o  <= 1'b0;
    end else begin
      done_o <= valid_i && last_i;
      if (valid_i) begin
        acc_o <= acc_next;
        ovf_o <= add_ovf || (!first_i && ovf_o);
      end
    end
  end

endmodule
