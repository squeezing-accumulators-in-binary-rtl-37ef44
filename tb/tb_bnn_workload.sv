// Workload testbench: one output pixel of each 3x3 binary convolution shape
// of a ResNet-18-style network, on bnn_datapath at its default parameters
// (64x64 array, 4-bit saturating accumulator, b = 3, D = 8).
//
// Layer shapes (input channels Cin, output channels Cout, 3x3 kernels):
//   64 -> 64   : N =  576 inputs =  9 tiles, 1 pass of 64 channels
//   128 -> 128 : N = 1152 inputs = 18 tiles, 2 passes
//   256 -> 256 : N = 2304 inputs = 36 tiles, 4 passes
//   512 -> 512 : N = 4608 inputs = 72 tiles, 8 passes
// Each pass streams all tiles of the dot product on consecutive cycles
// (first on the first, last on the last); the passes follow back to back.
// Weights are random with a per-channel bias towards agreeing or disagreeing
// with the input, from strongly negative to strongly positive dot products.
// Every channel's accumulator and overflow flag is checked against an
// integer reference, and the number of cycles each pass takes must equal
// its tile count. The run reports how many channels saturated and how often
// the sign of the reconstructed output 2*D*acc - N agrees with the sign of
// the exact dot product (reported only; accuracy is not a pass criterion).
module tb_bnn_workload;
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
  int n_sat = 0, n_chan = 0, n_sign_ok = 0, n_pass = 0;
  int ref_acc[M], dot[M], bias[M];
  bit ref_ovf[M];

  function automatic int tile_dot(input logic [T-1:0] a, input logic [T-1:0] b);
    int s = 0;
    for (int i = 0; i < T; i++) s += (a[i] ? 1 : -1) * (b[i] ? 1 : -1);
    return s;
  endfunction

  task automatic run_pass(input int k);
    int p, s, cycles, y_hat;
    for (int m = 0; m < M; m++) begin
      ref_acc[m] = 0;
      ref_ovf[m] = 0;
      dot[m] = 0;
      bias[m] = $urandom % 101;   // percent of weight bits that disagree
    end
    cycles = 0;
    for (int t = 0; t < k; t++) begin
      x = {$urandom, $urandom};
      for (int m = 0; m < M; m++)
        for (int i = 0; i < T; i++)
          w[m][i] = (($urandom % 100) < bias[m]) ? ~x[i] : x[i];
      valid = 1; first = (t == 0); last = (t == k - 1);
      for (int m = 0; m < M; m++) begin
        p = tile_dot(x, w[m]);
        dot[m] += p;
        p = (p + T) / 2;
        s = ref_acc[m] + (p + D / 2) / D;
        if (s > (1 << A) - 1) begin
          s = (1 << A) - 1;
          ref_ovf[m] = 1;
        end
        ref_acc[m] = s;
      end
      @(negedge clk);
      cycles++;
      if (done && t != k - 1) begin
        checks++;
        failures++;
        $display("FAIL done before the last tile");
      end
    end
    checks += 2;
    if (!done) begin
      failures++;
      $display("FAIL done missing after %0d tiles", k);
    end
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
      y_hat = 2 * int'(D) * int'(acc[m]) - k * int'(T);
      if ((y_hat >= 0) == (dot[m] >= 0)) n_sign_ok++;
      if (ovf[m]) n_sat++;
      n_chan++;
    end
    n_pass++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cin, tiles;
    valid = 0; first = 0; last = 0; x = '0; w = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int layer = 0; layer < 4; layer++) begin
      cin = 64 << layer;
      tiles = 9 * cin / T;
      for (int pass = 0; pass < cin / M; pass++) run_pass(tiles);
      $display("layer %0d->%0d: N=%0d, %0d tiles x %0d passes; so far %0d of %0d channels saturated, sign agrees in %0d",
               cin, cin, 9 * cin, tiles, cin / M, n_sat, n_chan, n_sign_ok);
    end
    valid = 0;
    checks++;
    if (n_pass != 15) begin
      failures++;
      $display("FAIL ran %0d passes", n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
