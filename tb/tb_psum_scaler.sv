// Self-checking testbench for psum_scaler.
//
// Exhaustive over every partial sum 0..T. Fixed builds are checked for
// T = 64 with each b = 1..6 and for T = 16 with b = 2 (a 5-bit psum with two
// dropped bits); the run-time build (T = 64) is checked for every b = 1..6
// applied on psum_b_i. The reference is integer division with round half
// up, floor((p + D/2) / D) with D = T / 2^b, which must equal scaled_o plus
// the rounding bit; the bit alone must equal the remainder test
// (p mod D) >= D/2 (false when D = 1).
module tb_psum_scaler;

  logic [6:0] p64;
  logic [4:0] p16;
  logic [2:0] b_rt;

  logic [6:0] s_rt;
  logic       r_rt;
  logic [6:0] s_fx [1:6];
  logic       r_fx [1:6];
  logic [2:0] s_16;
  logic       r_16;

  int checks = 0;
  int failures = 0;

  psum_scaler #(.T(64), .RUNTIME(1'b1)) u_rt (
    .psum_i(p64), .psum_b_i(b_rt), .scaled_o(s_rt), .round_o(r_rt));

  for (genvar b = 1; b <= 6; b++) begin : g_fx
    logic [7 - (6 - b) - 1:0] s;
    psum_scaler #(.T(64), .PSUM_B(b), .RUNTIME(1'b0)) u_fx (
      .psum_i(p64), .psum_b_i('0), .scaled_o(s), .round_o(r_fx[b]));
    assign s_fx[b] = 7'(s);
  end

  psum_scaler #(.T(16), .PSUM_B(2), .RUNTIME(1'b0)) u_16 (
    .psum_i(p16), .psum_b_i('0), .scaled_o(s_16), .round_o(r_16));

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s p64=%0d p16=%0d b=%0d got=%0d expected=%0d", what, p64, p16, b_rt, got, exp);
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
    int d;
    p16 = '0;
    for (int p = 0; p <= 64; p++) begin
      p64 = 7'(p);
      for (int b = 1; b <= 6; b++) begin
        b_rt = 3'(b);
        #1;
        d = 64 >> b;
        expect_eq("runtime value", int'(s_rt) + int'(r_rt), (p + d / 2) / d);
        expect_eq("runtime round", int'(r_rt), int'(d > 1 && (p % d) >= d / 2));
        expect_eq("fixed value", int'(s_fx[b]) + int'(r_fx[b]), (p + d / 2) / d);
        expect_eq("fixed round", int'(r_fx[b]), int'(d > 1 && (p % d) >= d / 2));
      end
    end
    for (int p = 0; p <= 16; p++) begin
      p16 = 5'(p);
      #1;
      expect_eq("T16 value", int'(s_16) + int'(r_16), (p + 2) / 4);
      expect_eq("T16 round", int'(r_16), int'((p % 4) >= 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
