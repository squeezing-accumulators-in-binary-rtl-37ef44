// Self-checking testbench for acc_adder.
//
// Exhaustive over all operands for a 4-bit accumulator with a 4-bit addend,
// in both ordinary and saturating mode, plus a 4-bit accumulator with a
// wider 7-bit addend. Expected values are computed with integer arithmetic:
// ordinary = (acc + p + cin) % 2^a, saturating = min(acc + p + cin, 2^a - 1),
// overflow = (acc + p + cin) > 2^a - 1. Saturation and wrap-around must each
// be seen at least once.
module tb_acc_adder;
  import bnn_pkg::*;

  logic [3:0] acc;
  logic [6:0] addend;
  logic       cin;
  logic [3:0] sum_oa, sum_sa, sum_wide;
  logic       ovf_oa, ovf_sa, ovf_wide;

  int checks = 0;
  int failures = 0;
  int n_wrap = 0;
  int n_sat = 0;

  acc_adder #(.ACC_W(4), .IN_W(4), .MODE(ACC_ORDINARY)) dut_oa (
    .acc_i(acc), .addend_i(addend[3:0]), .cin_i(cin), .sum_o(sum_oa), .overflow_o(ovf_oa));
  acc_adder #(.ACC_W(4), .IN_W(4), .MODE(ACC_SATURATING)) dut_sa (
    .acc_i(acc), .addend_i(addend[3:0]), .cin_i(cin), .sum_o(sum_sa), .overflow_o(ovf_sa));
  acc_adder #(.ACC_W(4), .IN_W(7), .MODE(ACC_SATURATING)) dut_wide (
    .acc_i(acc), .addend_i(addend), .cin_i(cin), .sum_o(sum_wide), .overflow_o(ovf_wide));

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s acc=%0d p=%0d cin=%0d got=%0d expected=%0d", what, acc, addend, cin, got, exp);
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
    int s4, sw;
    for (int a = 0; a < 16; a++) begin
      for (int p = 0; p < 128; p++) begin
        for (int c = 0; c < 2; c++) begin
          acc = 4'(a);
          addend = 7'(p);
          cin = c[0];
          #1;
          s4 = a + (p % 16) + c;
          sw = a + p + c;
          if (p < 16) begin
            expect_eq("OA sum", int'(sum_oa), s4 % 16);
            expect_eq("OA ovf", int'(ovf_oa), int'(s4 > 15));
            expect_eq("SA sum", int'(sum_sa), (s4 > 15) ? 15 : s4);
            expect_eq("SA ovf", int'(ovf_sa), int'(s4 > 15));
            if (s4 > 15) begin
              n_wrap++;
              n_sat++;
            end
          end
          expect_eq("wide SA sum", int'(sum_wide), (sw > 15) ? 15 : sw);
          expect_eq("wide SA ovf", int'(ovf_wide), int'(sw > 15));
        end
      end
    end
    checks += 2;
    if (n_wrap == 0) begin failures++; $display("FAIL no wrap-around seen"); end
    if (n_sat == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("wraps=%0d saturations=%0d", n_wrap, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
