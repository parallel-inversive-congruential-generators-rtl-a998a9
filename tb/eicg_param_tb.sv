// eicg_param_tb: self-checking test of the stream constants b^i = a*(i-1) + b.
//
// Two instances (4 and 9 streams) get random a, b modulo 2^31 - 1 and other
// primes. Each b^i is compared with a 128-bit reference, and the products
// b^i * inv(a) are checked to be the distinct values (i-1) + b*inv(a) mod m
// that make the family's N-tuples sound.
module eicg_param_tb;
  import icg_ref_pkg::*;

  localparam int unsigned W  = 31;
  localparam int unsigned N1 = 4;
  localparam int unsigned N2 = 9;

  int checks = 0, failures = 0;

  logic [W-1:0] a, b, m;
  logic [W-1:0] bi1 [N1];
  logic [W-1:0] bi2 [N2];

  eicg_param #(.WIDTH(W), .NSTREAMS(N1)) dut1 (.a(a), .b(b), .m(m), .bi(bi1));
  eicg_param #(.WIDTH(W), .NSTREAMS(N2)) dut2 (.a(a), .b(b), .m(m), .bi(bi2));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  task automatic try(input u64_t ai, input u64_t bv, input u64_t mi);
    u64_t ainv, exp, prod;
    a = W'(ai); b = W'(bv); m = W'(mi);
    #1;
    ainv = ref_inv(ai, mi);
    for (int k = 0; k < int'(N2); k++) begin
      exp = ref_addmod(ref_mulmod(ai, u64_t'(k), mi), bv, mi);
      if (k < int'(N1)) check(u64_t'(bi1[k]) == exp, $sformatf("N1 k=%0d got %0d exp %0d", k, bi1[k], exp));
      check(u64_t'(bi2[k]) == exp, $sformatf("N2 k=%0d got %0d exp %0d", k, bi2[k], exp));
      prod = ref_mulmod(u64_t'(bi2[k]), ainv, mi);
      if (ai != 0)
        check(prod == ref_addmod(u64_t'(k), ref_mulmod(bv, ainv, mi), mi), "b^i * inv(a) not (i-1) + b*inv(a)");
    end
  endtask

  localparam u64_t M31 = 64'h7FFF_FFFF;

  initial begin
    try(1, 0, M31);
    try(M31 - 1, M31 - 1, M31);
    try(M31 - 1, 3, M31);
    for (int i = 0; i < 2000; i++) try(ref_rand_below(M31 - 1) + 1, ref_rand_below(M31), M31);
    for (int i = 0; i < 200; i++) try(ref_rand_below(10) + 1, ref_rand_below(11), 11);
    for (int i = 0; i < 200; i++) try(ref_rand_below(1000002) + 1, ref_rand_below(1000003), 1000003);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
