// eicg_stream_tb: self-checking test of one explicit inversive generator
// stream x_n = inv(a*n + b) mod m.
//
// A monitor compares every number taken from the stream with the reference
// inverse of a*n + b and checks that the indices run n0, n0+1, ... . The
// driver loads several configurations: modulus 2^31 - 1 with a random start
// index, one arranged so that the argument passes through 0, a reload in the
// middle of a run, and a smaller prime. The consumer stalls at random. The
// timing is checked exactly: the first number appears NW + 6 + steps cycles
// after load (NW + 5 for a zero argument), and with no stall the next number
// follows steps + 3 cycles after the previous one was taken (2 for zero).
module eicg_stream_tb;
  import icg_ref_pkg::*;

  localparam int unsigned W  = 31;
  localparam int unsigned NW = 32;
  localparam u64_t        M31 = 64'h7FFF_FFFF;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc;

  logic          load, out_valid, out_ready, running;
  logic [W-1:0]  a, b, m, x;
  logic [NW-1:0] n0, n;
  logic [7:0]    inv_cycles;

  eicg_stream #(.WIDTH(W), .NW(NW)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .a(a), .b(b), .m(m), .n0(n0),
    .out_valid(out_valid), .out_ready(out_ready), .x(x), .n(n),
    .inv_cycles(inv_cycles), .running(running));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  // Current configuration, as the monitor expects it.
  u64_t cfg_a, cfg_b, cfg_m;
  u64_t exp_n;
  int   taken, zeros, stalls, timed;
  longint unsigned t_load, t_take;
  bit   first, was_valid, stalled_since;

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
      was_valid <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      was_valid <= out_valid;
      if (load) begin
        t_load <= cyc;
        first <= 1'b1;
        stalled_since <= 1'b0;
      end else begin
        if (out_valid && !was_valid) begin
          if (first)
            check(cyc - t_load == ((x == 0) ? NW + 5 : NW + 6 + inv_cycles),
                  $sformatf("seed latency %0d steps %0d", cyc - t_load, inv_cycles));
          else if (!stalled_since) begin
            check(cyc - t_take == ((x == 0) ? 2 : inv_cycles + 3),
                  $sformatf("interval %0d steps %0d", cyc - t_take, inv_cycles));
            timed++;
          end
        end
        if (out_valid && !out_ready) begin
          stalled_since <= 1'b1;
          stalls++;
        end
        if (out_valid && out_ready) begin
          u64_t arg;
          arg = ref_addmod(ref_mulmod(cfg_a, exp_n, cfg_m), cfg_b, cfg_m);
          check(u64_t'(n) == (exp_n & 64'hFFFF_FFFF), $sformatf("index %0d expected %0d", n, exp_n & 64'hFFFF_FFFF));
          check(u64_t'(x) == ref_inv(arg, cfg_m),
                $sformatf("n=%0d arg=%0d x=%0d exp=%0d", n, arg, x, ref_inv(arg, cfg_m)));
          if (arg == 0) zeros++;
          exp_n = exp_n + 1;
          taken++;
          t_take <= cyc;
          first <= 1'b0;
          stalled_since <= 1'b0;
        end
      end
    end
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic configure(input u64_t ai, input u64_t bv, input u64_t mi, input u64_t ni);
    @(negedge clk);
    a = W'(ai); b = W'(bv); m = W'(mi); n0 = NW'(ni);
    load = 1'b1;
    cfg_a = ai; cfg_b = bv; cfg_m = mi; exp_n = ni;
    @(negedge clk);
    load = 1'b0;
    a = '0; b = '0; m = '0; n0 = '0;
  endtask

  task automatic collect(input int count);
    int target;
    target = taken + count;
    while (taken < target) @(negedge clk);
  endtask

  initial begin
    u64_t ai, ni;
    rst_n = 1'b0; load = 1'b0; a = '0; b = '0; m = '0; n0 = '0;
    taken = 0; zeros = 0; stalls = 0; timed = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!running && !out_valid, "idle after reset");

    // Modulus 2^31 - 1, random a, b and start index.
    configure(ref_rand_below(M31 - 1) + 1, ref_rand_below(M31), M31, {32'd0, $urandom()});
    collect(400);

    // The argument a*n + b is 0 at n = n0 + 5.
    ai = ref_rand_below(M31 - 1) + 1;
    ni = 64'd1000;
    configure(ai, (M31 - ref_mulmod(ai, ni + 5, M31)) % M31, M31, ni);
    collect(20);

    // Reload in the middle of an inversion.
    configure(ref_rand_below(M31 - 1) + 1, ref_rand_below(M31), M31, 0);
    repeat (30) @(negedge clk);
    configure(12345, 678, 1000003, 64'hFFFF_FFF0);
    collect(100);

    // The index label wrapped around 2^NW; the argument did not.
    check(exp_n > 64'hFFFF_FFFF, "index wrap not reached");

    check(zeros > 0, "zero argument never seen");
    check(stalls > 0, "no consumer stall");
    check(timed > 0, "no stall-free interval timed");
    $display("eicg_stream: %0d numbers, %0d zero arguments, %0d stall cycles", taken, zeros, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
