// Self-checking testbench for popcount_tree.
//
// Checks a 64-bit tree (the tile size of the datapath) and an odd 13-bit
// tree (uneven split at every level) against a bit-by-bit count, on the
// all-zeros and all-ones corner cases, every single-one vector of the 64-bit
// tree, and random vectors. Purely combinational; a watchdog ends the run.
module tb_popcount_tree;

  localparam int unsigned NA = 64;
  localparam int unsigned NB = 13;

  logic [NA-1:0]           a_bits;
  logic [$clog2(NA+1)-1:0] a_count;
  logic [NB-1:0]           b_bits;
  logic [$clog2(NB+1)-1:0] b_count;

  int checks = 0;
  int failures = 0;

  popcount_tree #(.N(NA)) dut_a (.bits_i(a_bits), .count_o(a_count));
  popcount_tree #(.N(NB)) dut_b (.bits_i(b_bits), .count_o(b_count));

  function automatic int ref_count(input logic [63:0] v, input int n);
    int c = 0;
    for (int i = 0; i < n; i++) if (v[i]) c++;
    return c;
  endfunction

  task automatic check_vectors(input logic [NA-1:0] va, input logic [NB-1:0] vb);
    a_bits = va;
    b_bits = vb;
    #1;
    checks += 2;
    if (int'(a_count) != ref_count(64'(va), NA)) begin
      failures++;
      $display("FAIL N=64 bits=%h count=%0d expected=%0d", va, a_count, ref_count(64'(va), NA));
    end
    if (int'(b_count) != ref_count(64'(vb), NB)) begin
      failures++;
      $display("FAIL N=13 bits=%h count=%0d expected=%0d", vb, b_count, ref_count(64'(vb), NB));
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
    check_vectors('0, '0);
    check_vectors('1, '1);
    for (int i = 0; i < NA; i++) check_vectors(NA'(1) << i, NB'(1) << (i % NB));
    for (int i = 0; i < 2000; i++) check_vectors({$urandom, $urandom}, NB'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
