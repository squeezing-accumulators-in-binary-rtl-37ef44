// Self-checking testbench for xnor_popcount.
//
// The reference is the signed binary dot product: with 1 meaning +1 and 0
// meaning -1, sum(w*x) over the tile is computed with integer multiplies and
// the expected partial sum is (dot + T) / 2, the inverse of
// dot = 2*popcount(XNOR) - T. Checked at the datapath's T = 64 and at T = 16,
// on matching/opposite corner cases and random tiles.
module tb_xnor_popcount;

  localparam int unsigned TA = 64;
  localparam int unsigned TB = 16;

  logic [TA-1:0]           xa, wa;
  logic [$clog2(TA+1)-1:0] pa;
  logic [TB-1:0]           xb, wb;
  logic [$clog2(TB+1)-1:0] pb;

  int checks = 0;
  int failures = 0;

  xnor_popcount #(.T(TA)) dut_a (.x_i(xa), .w_i(wa), .psum_o(pa));
  xnor_popcount #(.T(TB)) dut_b (.x_i(xb), .w_i(wb), .psum_o(pb));

  function automatic int dot(input logic [63:0] x, input logic [63:0] w, input int n);
    int s = 0;
    for (int i = 0; i < n; i++) s += (x[i] ? 1 : -1) * (w[i] ? 1 : -1);
    return s;
  endfunction

  task automatic check(input logic [TA-1:0] x1, input logic [TA-1:0] w1,
                       input logic [TB-1:0] x2, input logic [TB-1:0] w2);
    int ea, eb;
    xa = x1; wa = w1; xb = x2; wb = w2;
    #1;
    ea = (dot(64'(x1), 64'(w1), TA) + TA) / 2;
    eb = (dot(64'(x2), 64'(w2), TB) + TB) / 2;
    checks += 2;
    if (int'(pa) != ea) begin
      failures++;
      $display("FAIL T=64 x=%h w=%h psum=%0d expected=%0d", x1, w1, pa, ea);
    end
    if (int'(pb) != eb) begin
      failures++;
      $display("FAIL T=16 x=%h w=%h psum=%0d expected=%0d", x2, w2, pb, eb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TA-1:0] r;
    logic [TB-1:0] s;
    check('0, '0, '0, '0);       // all match: psum = T
    check('1, '0, '1, '0);       // all differ: psum = 0
    r = {$urandom, $urandom};
    s = TB'($urandom);
    check(r, r, s, ~s);
    for (int i = 0; i < 2000; i++)
      check({$urandom, $urandom}, {$urandom, $urandom}, TB'($urandom), TB'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
