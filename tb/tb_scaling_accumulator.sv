// Self-checking testbench for scaling_accumulator.
//
// Four instances are driven with the same random control stream:
//   u_sa4 : T=64, 4-bit saturating accumulator, b=3 (D = 8)   - the default
//   u_oa7 : T=64, 7-bit ordinary accumulator,  b=4 (D = 4)
//   u_f16 : T=16, 5-bit ordinary accumulator,  b=2 (D = 4), a 5-bit psum
//           with its two low bits dropped and the upper one used to round
// The reference scales each psum with integer division, round half up:
// floor((p + D/2) / D), independent of the bit selection in the design, and
// accumulates modulo 2^a or clipped at 2^a - 1. Every cycle the testbench
// checks acc_o, done_o (one cycle after a valid last tile) and ovf_o.
//   u_rt  : T=64, 7-bit saturating accumulator, b read at run time
//           (psum_b_i), changed at random between sums
// It also counts run-time changes of b, round-ups, saturations, wrap-arounds, idle cycles inside a
// sum and back-to-back restarts, and fails if any of them never happened.
module tb_scaling_accumulator;
  import bnn_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, first, last;
  logic [6:0] p64;
  logic [4:0] p16;

  logic [3:0] acc_sa4;
  logic [6:0] acc_oa7;
  logic [4:0] acc_f16;
  logic [6:0] acc_rt;
  logic [2:0] b_rt;
  logic done_sa4, done_oa7, done_f16, done_rt;
  logic ovf_sa4, ovf_oa7, ovf_f16, ovf_rt;

  int checks = 0;
  int failures = 0;
  int n_bswitch = 0;
  int n_round = 0, n_sat = 0, n_wrap = 0, n_idle = 0, n_restart = 0, n_done = 0;

  always #5 clk = ~clk;

  scaling_accumulator #(.T(64), .ACC_W(4), .PSUM_B(3), .MODE(ACC_SATURATING)) u_sa4 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_i(p64), .psum_b_i('0), .acc_o(acc_sa4), .done_o(done_sa4), .ovf_o(ovf_sa4));
  scaling_accumulator #(.T(64), .ACC_W(7), .PSUM_B(4), .MODE(ACC_ORDINARY)) u_oa7 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_i(p64), .psum_b_i('0), .acc_o(acc_oa7), .done_o(done_oa7), .ovf_o(ovf_oa7));
  scaling_accumulator #(.T(64), .ACC_W(7), .PSUM_B(3), .MODE(ACC_SATURATING), .RUNTIME_SCALE(1'b1)) u_rt (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_i(p64), .psum_b_i(b_rt), .acc_o(acc_rt), .done_o(done_rt), .ovf_o(ovf_rt));
  scaling_accumulator #(.T(16), .ACC_W(5), .PSUM_B(2), .MODE(ACC_ORDINARY)) u_f16 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .first_i(first), .last_i(last),
    .psum_i(p16), .psum_b_i('0), .acc_o(acc_f16), .done_o(done_f16), .ovf_o(ovf_f16));

  // Reference state: accumulator value and overflow flag per instance.
  int r_acc[4];
  bit r_ovf[4];
  bit r_done;

  function automatic int scaled(input int p, input int d);
    return (p + d / 2) / d;
  endfunction

  task automatic model_step(input int idx, input int p, input int d, input int aw, input bit sat);
    int base, s, maxv;
    maxv = (1 << aw) - 1;
    base = first ? 0 : r_acc[idx];
    s = base + scaled(p, d);
    if (first) r_ovf[idx] = 0;
    if (s > maxv) begin
      r_ovf[idx] = 1;
      if (sat) n_sat++; else n_wrap++;
      s = sat ? maxv : (s % (maxv + 1));
    end
    r_acc[idx] = s;
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %0t %s got=%0d expected=%0d", $time, what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit in_sum;
    int len;
    valid = 0; first = 0; last = 0; p64 = '0; p16 = '0;
    r_acc = '{0, 0, 0, 0};
    r_ovf = '{0, 0, 0, 0};
    b_rt = 3'd3;
    r_done = 0;
    in_sum = 0;
    len = 0;
    repeat (3) @(posedge clk);
    // Reset state.
    expect_eq("reset acc", int'(acc_sa4) + int'(acc_oa7) + int'(acc_f16), 0);
    expect_eq("reset done", int'(done_sa4), 0);
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // Drive one cycle of stimulus on the falling edge.
      valid = ($urandom % 8) != 0;
      if (!valid && in_sum) n_idle++;
      first = 0;
      last = 0;
      if (valid) begin
        if (!in_sum) begin
          first = 1;
          in_sum = 1;
          if (($urandom % 2) == 0) begin
            b_rt = 3'(1 + $urandom % 6);
            n_bswitch++;
          end
          len = 1 + ($urandom % 12);
          if (r_done) n_restart++;
        end
        len--;
        if (len == 0) begin
          last = 1;
          in_sum = 0;
        end
      end
      // Bias towards large partial sums now and then so the accumulators fill.
      p64 = ($urandom % 2) ? 7'(40 + $urandom % 25) : 7'($urandom % 65);
      p16 = 5'($urandom % 17);
      if (valid && ((p64 % 8) >= 4)) n_round++;
      if (valid) begin
        model_step(0, int'(p64), 8, 4, 1);
        model_step(1, int'(p64), 4, 7, 0);
        model_step(2, int'(p16), 4, 5, 0);
        model_step(3, int'(p64), 64 >> b_rt, 7, 1);
      end
      r_done = valid && last;
      @(posedge clk);
      #1;
      expect_eq("SA4 acc", int'(acc_sa4), r_acc[0]);
      expect_eq("OA7 acc", int'(acc_oa7), r_acc[1]);
      expect_eq("F16 acc", int'(acc_f16), r_acc[2]);
      expect_eq("SA4 ovf", int'(ovf_sa4), int'(r_ovf[0]));
      expect_eq("OA7 ovf", int'(ovf_oa7), int'(r_ovf[1]));
      expect_eq("F16 ovf", int'(ovf_f16), int'(r_ovf[2]));
      expect_eq("RT acc", int'(acc_rt), r_acc[3]);
      expect_eq("RT ovf", int'(ovf_rt), int'(r_ovf[3]));
      expect_eq("done", int'(done_sa4) + int'(done_oa7) + int'(done_f16) + int'(done_rt), r_done ? 4 : 0);
      if (r_done) n_done++;
      @(negedge clk);
    end
    $display("round-ups=%0d saturations=%0d wraps=%0d idle=%0d restarts=%0d sums=%0d b-changes=%0d",
             n_round, n_sat, n_wrap, n_idle, n_restart, n_done, n_bswitch);
    checks += 7;
    if (n_bswitch == 0) begin failures++; $display("FAIL no run-time change of b"); end
    if (n_round == 0)   begin failures++; $display("FAIL no round-up seen"); end
    if (n_sat == 0)     begin failures++; $display("FAIL no saturation seen"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL no wrap-around seen"); end
    if (n_idle == 0)    begin failures++; $display("FAIL no idle cycle inside a sum"); end
    if (n_restart == 0) begin failures++; $display("FAIL no back-to-back restart"); end
    if (n_done == 0)    begin failures++; $display("FAIL no sum completed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
