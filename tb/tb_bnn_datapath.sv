// End-to-end testbench for bnn_datapath.
//
// Four arrays are driven with the same tiles and control:
//   u_sa : the default configuration (T=64, 64 lanes, 4-bit saturating
//          accumulator, b=3, scale D = 8)
//   u_oa : 7-bit ordinary accumulator, b=4 (D = 4)
//   u_ex : 16-bit ordinary accumulator, b=6 (D = 1, no scaling), whose result
//          must reproduce the exact dot product y = 2*acc - N
//   u_rt : 7-bit saturating accumulator with run-time scaling; b is changed
//          at random between dot products through psum_b_i
// Each operation is a dot product of N = k*64 inputs (k = 1..12 tiles) for
// all 64 output channels. Weights are the input with a random fraction of
// bits flipped, so partial sums range from small to near T and the narrow
// accumulators both overflow and stay in range. The reference computes each
// tile's signed +-1 dot product with integer arithmetic, converts it to the
// partial sum (dot + T)/2, scales with round-half-up integer division and
// accumulates modulo 2^a or clipped. After every done_o the testbench checks
// all lanes' acc_o and ovf_o, and that done_o came exactly one cycle after
// the last tile. It counts the mechanisms of the design (run-time change of
// b, rounding carry in, saturation, wrap-around, idle cycles inside a sum,
// back-to-back restart, multi-tile sums) and fails if one never happened.
module tb_bnn_datapath;
  import bnn_pkg::*;

  localparam int unsigned T = 64;
  localparam int unsigned M = 64;
  localparam int unsigned MAXK = 12;
  localparam int unsigned NOPS = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, first, last;
  logic [T-1:0] x;
  logic [M-1:0][T-1:0] w;

  logic [M-1:0][3:0]  acc_sa;
  logic [M-1:0][6:0]  acc_oa;
  logic [M-1:0][15:0] acc_ex;
  logic [M-1:0][6:0]  acc_rt;
  logic [2:0] b_rt;
  logic done_sa, done_oa, done_ex, done_rt;
  logic [M-1:0] ovf_sa, ovf_oa, ovf_ex, ovf_rt;

  always #5 clk = ~clk;

  bnn_datapath u_sa (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_b_i('0), .x_i(x), .w_i(w), .acc_o(acc_sa), .done_o(done_sa), .ovf_o(ovf_sa));
  bnn_datapath #(.ACC_W(7), .PSUM_B(4), .MODE(ACC_ORDINARY)) u_oa (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_b_i('0), .x_i(x), .w_i(w), .acc_o(acc_oa), .done_o(done_oa), .ovf_o(ovf_oa));
  bnn_datapath #(.ACC_W(7), .MODE(ACC_SATURATING), .RUNTIME_SCALE(1'b1)) u_rt (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_b_i(b_rt), .x_i(x), .w_i(w), .acc_o(acc_rt), .done_o(done_rt), .ovf_o(ovf_rt));
  bnn_datapath #(.ACC_W(16), .PSUM_B(6), .MODE(ACC_ORDINARY)) u_ex (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_b_i('0), .x_i(x), .w_i(w), .acc_o(acc_ex), .done_o(done_ex), .ovf_o(ovf_ex));

  int checks = 0;
  int failures = 0;
  int n_bswitch = 0;
  int n_round = 0, n_sat = 0, n_wrap = 0, n_idle = 0, n_restart = 0, n_multi = 0, n_ops = 0;

  // Reference state per lane.
  int ref_sa[M], ref_oa[M], ref_ex[M], ref_rt[M], dot_sum[M];
  bit rovf_sa[M], rovf_oa[M], rovf_rt[M];

  function automatic int tile_dot(input logic [T-1:0] a, input logic [T-1:0] b);
    int s = 0;
    for (int i = 0; i < T; i++) s += (a[i] ? 1 : -1) * (b[i] ? 1 : -1);
    return s;
  endfunction

  task automatic expect_eq(input string what, input int lane, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL op %0d lane %0d %s got=%0d expected=%0d", n_ops, lane, what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, flip_pct, p, q, s;
    bit prev_last;
    valid = 0; first = 0; last = 0; x = '0; w = '0;
    prev_last = 0;
    b_rt = 3'd3;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      k = 1 + ($urandom % MAXK);
      flip_pct = $urandom % 60;
      if (k > 1) n_multi++;
      if (op > 0 && ($urandom % 2) == 0) begin
        b_rt = 3'(1 + $urandom % 6);
        n_bswitch++;
      end
      if (prev_last) n_restart++;
      for (int m = 0; m < M; m++) begin
        ref_sa[m] = 0; ref_oa[m] = 0; ref_ex[m] = 0; ref_rt[m] = 0; dot_sum[m] = 0;
        rovf_sa[m] = 0; rovf_oa[m] = 0; rovf_rt[m] = 0;
      end
      for (int t = 0; t < k; t++) begin
        // Sometimes leave an idle cycle inside the sum.
        if (t > 0 && ($urandom % 4) == 0) begin
          valid = 0; first = 0; last = 0;
          x = {$urandom, $urandom};
          n_idle++;
          @(negedge clk);
        end
        x = {$urandom, $urandom};
        for (int m = 0; m < M; m++)
          for (int i = 0; i < T; i++)
            w[m][i] = (($urandom % 100) < flip_pct) ? ~x[i] : x[i];
        valid = 1; first = (t == 0); last = (t == k - 1);
        for (int m = 0; m < M; m++) begin
          q = tile_dot(x, w[m]);
          dot_sum[m] += q;
          p = (q + T) / 2;
          if ((p % 8) >= 4) n_round++;
          s = ref_sa[m] + (p + 4) / 8;
          if (s > 15) begin s = 15; rovf_sa[m] = 1; n_sat++; end
          ref_sa[m] = s;
          s = ref_oa[m] + (p + 2) / 4;
          if (s > 127) begin s = s % 128; rovf_oa[m] = 1; n_wrap++; end
          ref_oa[m] = s;
          ref_ex[m] = ref_ex[m] + p;
          s = ref_rt[m] + (p + (32 >> b_rt)) / (64 >> b_rt);
          if (s > 127) begin s = 127; rovf_rt[m] = 1; end
          ref_rt[m] = s;
        end
        @(negedge clk);
      end
      // The cycle after the last tile: done_o must be high now, and the
      // next operation's first tile may already be presented.
      prev_last = 1;
      checks++;
      if (!(done_sa && done_oa && done_ex && done_rt)) begin
        failures++;
        $display("FAIL op %0d done not asserted one cycle after the last tile", op);
      end
      for (int m = 0; m < M; m++) begin
        expect_eq("SA acc", m, int'(acc_sa[m]), ref_sa[m]);
        expect_eq("OA acc", m, int'(acc_oa[m]), ref_oa[m]);
        expect_eq("exact acc", m, int'(acc_ex[m]), ref_ex[m]);
        expect_eq("exact y", m, 2 * int'(acc_ex[m]) - k * T, dot_sum[m]);
        expect_eq("SA ovf", m, int'(ovf_sa[m]), int'(rovf_sa[m]));
        expect_eq("OA ovf", m, int'(ovf_oa[m]), int'(rovf_oa[m]));
        expect_eq("exact ovf", m, int'(ovf_ex[m]), 0);
        expect_eq("runtime acc", m, int'(acc_rt[m]), ref_rt[m]);
        expect_eq("runtime ovf", m, int'(ovf_rt[m]), int'(rovf_rt[m]));
      end
      n_ops++;
      // Now and then insert idle cycles between operations.
      if (($urandom % 3) == 0) begin
        valid = 0; first = 0; last = 0;
        prev_last = 0;
        @(negedge clk);
        checks++;
        if (done_sa || done_oa || done_ex || done_rt) begin
          failures++;
          $display("FAIL op %0d done stayed high", op);
        end
        @(negedge clk);
      end
    end
    valid = 0;
    $display("ops=%0d multi-tile=%0d round-ups=%0d saturations=%0d wraps=%0d idle=%0d restarts=%0d b-changes=%0d",
             n_ops, n_multi, n_round, n_sat, n_wrap, n_idle, n_restart, n_bswitch);
    checks += 7;
    if (n_bswitch == 0) begin failures++; $display("FAIL no run-time change of b"); end
    if (n_round == 0)   begin failures++; $display("FAIL no round-up seen"); end
    if (n_sat == 0)     begin failures++; $display("FAIL no saturation seen"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL no wrap-around seen"); end
    if (n_idle == 0)    begin failures++; $display("FAIL no idle cycle inside a sum"); end
    if (n_restart == 0) begin failures++; $display("FAIL no back-to-back restart"); end
    if (n_multi == 0)   begin failures++; $display("FAIL no multi-tile sum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
