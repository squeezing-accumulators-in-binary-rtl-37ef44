// Full-size testbench for bnn_datapath at its default parameters
// (64x64 array, 4-bit saturating accumulator, b = 3, scale D = 8).
//
// One complete operation is one output pixel of a 3x3 binary convolution
// with 64 input and 64 output channels: N = 576 inputs, fed as nine 64-bit
// tiles on nine consecutive cycles, all 64 output channels at once. A second
// operation with N = 64 (a single tile) follows back to back. Weights are
// the input with a per-channel fraction of bits flipped, so some channels
// saturate and others do not. The reference works from signed +-1 dot
// products in integer arithmetic and checks every channel's accumulator,
// its overflow flag, and that done_o rises exactly one cycle after the last
// tile (one tile per cycle, latency one cycle).
module tb_bnn_datapath_full;
  import bnn_pkg::*;

  localparam int unsigned T = TILE_SIZE;
  localparam int unsigned M = NUM_LANES;
  localparam int unsigned A = ACC_WIDTH;
  localparam int unsigned D = T / (2 ** PSUM_BITS);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, first, last;
  logic [T-1:0] x;
  logic [M-1:0][T-1:0] w;
  logic [M-1:0][A-1:0] acc;
  logic done;
  logic [M-1:0] ovf;

  always #5 clk = ~clk;

  bnn_datapath dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_b_i('0), .x_i(x), .w_i(w), .acc_o(acc), .done_o(done), .ovf_o(ovf));

  int checks = 0;
  int failures = 0;
  int n_sat_lanes = 0;
  int ref_acc[M];
  bit ref_ovf[M];

  function automatic int tile_dot(input logic [T-1:0] a, input logic [T-1:0] b);
    int s = 0;
    for (int i = 0; i < T; i++) s += (a[i] ? 1 : -1) * (b[i] ? 1 : -1);
    return s;
  endfunction

  task automatic run_op(input int k);
    int p, s, cycles;
    for (int m = 0; m < M; m++) begin
      ref_acc[m] = 0;
      ref_ovf[m] = 0;
    end
    cycles = 0;
    for (int t = 0; t < k; t++) begin
      x = {$urandom, $urandom};
      for (int m = 0; m < M; m++)
        for (int i = 0; i < T; i++)
          w[m][i] = (($urandom % 64) < m) ? ~x[i] : x[i];
      valid = 1; first = (t == 0); last = (t == k - 1);
      for (int m = 0; m < M; m++) begin
        p = (tile_dot(x, w[m]) + T) / 2;
        s = ref_acc[m] + (p + D / 2) / D;
        if (s > (1 << A) - 1) begin
          s = (1 << A) - 1;
          ref_ovf[m] = 1;
        end
        ref_acc[m] = s;
      end
      @(negedge clk);
      cycles++;
      checks++;
      if (done != (t == k - 1)) begin
        failures++;
        $display("FAIL done=%0d after tile %0d of %0d", done, t, k);
      end
    end
    checks++;
    if (cycles != k) begin
      failures++;
      $display("FAIL %0d tiles took %0d cycles", k, cycles);
    end
    for (int m = 0; m < M; m++) begin
      checks += 2;
      if (int'(acc[m]) != ref_acc[m]) begin
        failures++;
        $display("FAIL N=%0d channel %0d acc=%0d expected=%0d", k * T, m, acc[m], ref_acc[m]);
      end
      if (ovf[m] != ref_ovf[m]) begin
        failures++;
        $display("FAIL N=%0d channel %0d ovf=%0d expected=%0d", k * T, m, ovf[m], ref_ovf[m]);
      end
      if (ref_ovf[m]) n_sat_lanes++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; first = 0; last = 0; x = '0; w = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run_op(9);   // 3x3x64 convolution window
    run_op(1);   // single-tile dot product, back to back
    valid = 0;
    @(negedge clk);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done stayed high");
    end
    checks++;
    if (n_sat_lanes == 0) begin
      failures++;
      $display("FAIL no channel saturated");
    end
    $display("saturated channels=%0d", n_sat_lanes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
