// modmul_tb: self-checking test of the bit-serial multiply-add (a*n + c) mod m.
//
// Random operands modulo 2^31 - 1 and other moduli, plus the extreme values
// (n = 0, n all ones, a = m-1, c = m-1), are compared with a 128-bit
// reference. The latency is checked to be NW + 2 cycles from the accepting
// cycle to out_valid, and the result must stay put while the consumer stalls.
module modmul_tb;
  import icg_ref_pkg::*;

  localparam int unsigned W  = 31;
  localparam int unsigned NW = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0]  a, c, m, p;
  logic [NW-1:0] n;

  modmul #(.WIDTH(W), .NW(NW)) dut (
    .clk(clk), .rst_n(rst_n), .clear(1'b0),
    .in_valid(in_valid), .in_ready(in_ready), .a(a), .n(n), .c(c), .m(m),
    .out_valid(out_valid), .out_ready(out_ready), .p(p));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  task automatic run(input u64_t ai, input u64_t ni, input u64_t ci, input u64_t mi, input bit stall);
    longint unsigned t0, lat;
    u64_t exp;
    logic [W-1:0] held;
    @(negedge clk);
    a = W'(ai); n = NW'(ni); c = W'(ci); m = W'(mi); in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    in_valid = 1'b0;
    a = '0; n = '0; c = '0; m = '0;
    while (!out_valid) @(negedge clk);
    lat = cyc - t0;
    exp = ref_addmod(ref_mulmod(ai, ni, mi), ci, mi);
    check(u64_t'(p) == exp, $sformatf("a=%0d n=%0d c=%0d m=%0d p=%0d exp=%0d", ai, ni, ci, mi, p, exp));
    check(lat == NW + 2, $sformatf("latency %0d", lat));
    if (stall) begin
      out_ready = 1'b0;
      held = p;
      repeat ($urandom_range(1, 3)) @(negedge clk);
      check(out_valid && p == held, "result not held during stall");
      out_ready = 1'b1;
    end
    @(negedge clk);
  endtask

  localparam u64_t M31 = 64'h7FFF_FFFF;
  u64_t mods [4] = '{64'd2, 64'd1000003, 64'd2147483629, 64'd1_234_567_890};

  initial begin
    in_valid = 0; out_ready = 1; a = '0; n = '0; c = '0; m = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, 12345, 7, M31, 0);
    run(M31 - 1, 64'hFFFF_FFFF, M31 - 1, M31, 0);
    run(M31 - 1, 0, M31 - 1, M31, 0);
    run(1, 64'hFFFF_FFFF, 0, M31, 1);
    for (int i = 0; i < 1000; i++)
      run(ref_rand_below(M31), {32'd0, $urandom()}, ref_rand_below(M31), M31, ($urandom_range(0, 5) == 0));
    foreach (mods[k]) for (int i = 0; i < 200; i++)
      run(ref_rand_below(mods[k]), {32'd0, $urandom()}, ref_rand_below(mods[k]), mods[k], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
