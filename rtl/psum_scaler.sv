// Partial-sum scaler: divides a partial sum by D = T / 2^b and provides the
// rounding bit.
//
// Dividing p by D = 2^C, C = log2(T) - b, keeps p[PW-1:C]; round-half-up
// adds the most significant dropped bit, p[C-1], which the accumulator adder
// takes as its carry in, so no incrementer is built here.
//
// Two builds, chosen by RUNTIME:
//   RUNTIME = 0 : b is the parameter PSUM_B and the scaler is pure bit
//                 selection, no gates (the configuration for one target
//                 network). scaled_o is PW - C bits; psum_b_i is ignored.
//   RUNTIME = 1 : b comes from psum_b_i (1..log2 T) and a right shifter plus
//                 a bit multiplexer select the bits, for hardware that must
//                 run networks with different optimal partial-sum
//                 precisions. scaled_o is PW bits (the b = log2 T case).
// Both variants follow the method; the port layout is this design's own.
// Purely combinational.
module psum_scaler #(
  parameter int unsigned T       = bnn_pkg::TILE_SIZE,
  parameter int unsigned PSUM_B  = bnn_pkg::PSUM_BITS,
  parameter bit          RUNTIME = 1'b0,
  localparam int unsigned PW     = $clog2(T + 1),
  localparam int unsigned LOG2T  = $clog2(T),
  localparam int unsigned BW     = $clog2(LOG2T + 1),
  localparam int unsigned SW     = RUNTIME ? PW : PW - (LOG2T - PSUM_B)
) (
  input  logic [PW-1:0] psum_i,
  input  logic [BW-1:0] psum_b_i,   // effective psum precision, RUNTIME only
  output logic [SW-1:0] scaled_o,
  output logic          round_o
);

  if ((2 ** LOG2T) != T || PSUM_B > LOG2T || PSUM_B == 0) begin : g_bad_cfg
    $error("psum_scaler: T must be a power of two and 1 <= PSUM_B <= log2(T)");
  end

  if (!RUNTIME) begin : g_fixed
    localparam int unsigned C = LOG2T - PSUM_B;

    assign scaled_o = psum_i[PW-1:C];
    if (C > 0) begin : g_round
      assign round_o = psum_i[C-1];
    end else begin : g_no_round
      assign round_o = 1'b0;
    end
  end else begin : g_runtime
    logic [BW-1:0] c_amt;   // bits to drop

    always_comb begin
      c_amt    = BW'(LOG2T) - psum_b_i;
      scaled_o = psum_i >> c_amt;
      round_o  = (c_amt == '0) ? 1'b0 : psum_i[c_amt - BW'(1)];
    end
  end

endmodule
