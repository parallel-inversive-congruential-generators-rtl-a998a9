// modinv_tb: self-checking test of the binary extended Euclidean inverter.
//
// Two instances are tested: the default 31-bit one against the Mersenne prime
// 2^31 - 1 and several smaller primes (one of them exhaustively), and a
// 61-bit one against 2^61 - 1, the wider-register option. Every result is
// compared with x^(m-2) mod m and with x * inv == 1 (mod m). The consumer
// stalls at random, the latency of every operation is checked against its
// reported step count (steps + 2 cycles, 1 cycle for x = 0), and the step
// count against its bound of 2*WIDTH.
module modinv_tb;
  import icg_ref_pkg::*;

  localparam int unsigned W1 = 31;
  localparam int unsigned W2 = 61;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // --- 31-bit instance ---------------------------------------------------
  logic          a_in_valid, a_in_ready, a_out_valid, a_out_ready;
  logic [W1-1:0] a_x, a_m, a_inv;
  logic [7:0]    a_cycles;

  modinv #(.WIDTH(W1)) dut_a (
    .clk(clk), .rst_n(rst_n), .clear(1'b0),
    .in_valid(a_in_valid), .in_ready(a_in_ready), .x(a_x), .m(a_m),
    .out_valid(a_out_valid), .out_ready(a_out_ready), .inv(a_inv), .cycles(a_cycles));

  // --- 61-bit instance ---------------------------------------------------
  logic          b_in_valid, b_in_ready, b_out_valid, b_out_ready;
  logic [W2-1:0] b_x, b_m, b_inv;
  logic [7:0]    b_cycles;

  modinv #(.WIDTH(W2)) dut_b (
    .clk(clk), .rst_n(rst_n), .clear(1'b0),
    .in_valid(b_in_valid), .in_ready(b_in_ready), .x(b_x), .m(b_m),
    .out_valid(b_out_valid), .out_ready(b_out_ready), .inv(b_inv), .cycles(b_cycles));

  int unsigned max_steps_a = 0, max_steps_b = 0;
  longint unsigned sum_steps_a = 0, n_a = 0;
  int stalls = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  task automatic inv_a(input u64_t x, input u64_t m, input bit stall);
    longint unsigned t0, lat;
    u64_t exp;
    @(negedge clk);
    a_x = W1'(x); a_m = W1'(m); a_in_valid = 1'b1;
    while (!a_in_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    a_in_valid = 1'b0;
    while (!a_out_valid) @(negedge clk);
    lat = cyc - t0;
    if (stall) begin
      a_out_ready = 1'b0;
      repeat ($urandom_range(1, 4)) @(negedge clk);
      stalls++;
      check(a_out_valid, "result dropped during stall");
    end
    exp = ref_inv(x, m);
    check(u64_t'(a_inv) == exp, $sformatf("m=%0d x=%0d inv=%0d exp=%0d", m, x, a_inv, exp));
    if (x != 0) check(ref_mulmod(x, u64_t'(a_inv), m) == 1, $sformatf("x*inv != 1 m=%0d x=%0d", m, x));
    check(lat == ((x == 0) ? 1 : longint'(a_cycles) + 2), $sformatf("latency %0d steps %0d", lat, a_cycles));
    check(int'(a_cycles) <= 2 * W1, $sformatf("steps %0d over bound", a_cycles));
    if (int'(a_cycles) > max_steps_a) max_steps_a = a_cycles;
    if (m == 64'h7FFF_FFFF && x != 0) begin sum_steps_a += longint'(a_cycles); n_a++; end
    a_out_ready = 1'b1;
    @(negedge clk);
    a_out_ready = 1'b1;
  endtask

  task automatic inv_b(input u64_t x, input u64_t m);
    u64_t exp;
    @(negedge clk);
    b_x = W2'(x); b_m = W2'(m); b_in_valid = 1'b1;
    while (!b_in_ready) @(negedge clk);
    @(negedge clk);
    b_in_valid = 1'b0;
    while (!b_out_valid) @(negedge clk);
    exp = ref_inv(x, m);
    check(u64_t'(b_inv) == exp, $sformatf("W61 m=%0d x=%0d inv=%0d exp=%0d", m, x, b_inv, exp));
    check(int'(b_cycles) <= 2 * W2, "W61 steps over bound");
    if (int'(b_cycles) > max_steps_b) max_steps_b = b_cycles;
  endtask

  localparam u64_t M31 = 64'h7FFF_FFFF;
  localparam u64_t M61 = 64'h1FFF_FFFF_FFFF_FFFF;
  u64_t primes [5] = '{64'd3, 64'd7, 64'd65521, 64'd1000003, 64'd2147483629};

  initial begin
    a_in_valid = 0; a_out_ready = 1; a_x = '0; a_m = '0;
    b_in_valid = 0; b_out_ready = 1; b_x = '0; b_m = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Edge values modulo 2^31 - 1.
    inv_a(0, M31, 0); inv_a(1, M31, 0); inv_a(2, M31, 0);
    inv_a(M31 - 1, M31, 0); inv_a(M31 - 2, M31, 0);
    for (int i = 1; i < 31; i++) inv_a(64'd1 << i, M31, 0);
    // Random values modulo 2^31 - 1, with random consumer stalls.
    for (int i = 0; i < 3000; i++) inv_a(ref_rand_below(M31), M31, ($urandom_range(0, 7) == 0));
    // Other primes.
    foreach (primes[p]) for (int i = 0; i < 200; i++) inv_a(ref_rand_below(primes[p]), primes[p], 0);
    // Every residue modulo 1009.
    for (int i = 0; i < 1009; i++) inv_a(u64_t'(i), 1009, 0);

    // 61-bit instance, modulus 2^61 - 1.
    b_in_valid = 0;
    inv_b(0, M61); inv_b(1, M61); inv_b(M61 - 1, M61);
    for (int i = 0; i < 500; i++) inv_b(ref_rand_below(M61), M61);
    inv_b(ref_rand_below(M31), M31);

    check(stalls > 0, "no consumer stall exercised");
    $display("modinv W=31: max steps %0d, mean steps mod 2^31-1 %0d.%02d; W=61: max steps %0d",
             max_steps_a, sum_steps_a / n_a, (sum_steps_a * 100 / n_a) % 100, max_steps_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
