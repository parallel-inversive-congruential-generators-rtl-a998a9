// picg_top_tb: end-to-end test of the parallel explicit inversive generator
// at its default size (31-bit registers, 4 streams, 32-bit index).
//
// The host side is modelled by the driver: it loads a family (a, b, m, n0)
// and takes tuples with a random ready. A monitor checks every tuple: the
// index runs n0, n0+1, ..., and x_n^i equals inv(a*n + a*(i-1) + b) mod m
// computed by Fermat's theorem; consecutive tuples also satisfy
// x_n^i == x_(n+1)^(i-1), which the family's constants imply. The interval
// from one take to the next tuple must be the slowest inversion's steps + 3
// cycles when the host does not stall. The test counts each mechanism of the
// design and fails any that never happened: streams waiting on a slower
// one at the join, host back-pressure, a zero argument (inverse 0), the
// argument wrapping modulo m, a start at an arbitrary index, a reload while
// running, and a modulus other than 2^31 - 1.
module picg_top_tb;
  import icg_ref_pkg::*;

  localparam int unsigned W  = icg_pkg::ICG_WIDTH;
  localparam int unsigned N  = 4;
  localparam int unsigned NW = icg_pkg::ICG_IDXW;
  localparam u64_t        M31 = 64'h7FFF_FFFF;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc;

  logic          cfg_load, tuple_valid, tuple_ready, running;
  logic [W-1:0]  cfg_a, cfg_b, cfg_m;
  logic [NW-1:0] cfg_n0, tuple_n;
  logic [W-1:0]  tuple_x [N];
  logic [N-1:0]  lane_wait;
  logic [7:0]    tuple_cycles;

  picg_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load),
    .cfg_a(cfg_a), .cfg_b(cfg_b), .cfg_m(cfg_m), .cfg_n0(cfg_n0),
    .tuple_valid(tuple_valid), .tuple_ready(tuple_ready), .tuple_x(tuple_x),
    .tuple_n(tuple_n), .lane_wait(lane_wait), .tuple_cycles(tuple_cycles),
    .running(running));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  // Configuration the monitor expects.
  u64_t ca, cb, cm, exp_n;
  logic [W-1:0] prev_x [N];
  bit   have_prev, was_valid, stalled, after_load;
  longint unsigned t_take;
  int   tuples, timed;
  // Mechanism counters.
  int   n_join_wait, n_backpressure, n_zero, n_wrap, n_seek, n_reload, n_other_mod;

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
      was_valid <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      was_valid <= tuple_valid;
      if (cfg_load) begin
        have_prev  <= 1'b0;
        after_load <= 1'b1;
        stalled    <= 1'b0;
        if (running) n_reload++;
        if (cfg_m != W'(M31)) n_other_mod++;
        if (cfg_n0 != 0) n_seek++;
      end else begin
        if (lane_wait != '0) n_join_wait++;
        if (tuple_valid && !was_valid && !after_load && !stalled && tuple_cycles != 0) begin
          check(cyc - t_take == longint'(tuple_cycles) + 3,
                $sformatf("tuple interval %0d, slowest steps %0d", cyc - t_take, tuple_cycles));
          timed++;
        end
        if (tuple_valid && !tuple_ready) begin
          n_backpressure++;
          stalled <= 1'b1;
        end
        if (tuple_valid && tuple_ready) begin
          check(u64_t'(tuple_n) == (exp_n & 64'hFFFF_FFFF),
                $sformatf("tuple index %0d expected %0d", tuple_n, exp_n));
          for (int i = 0; i < int'(N); i++) begin
            u64_t arg, arg_next;
            arg = ref_addmod(ref_mulmod(ca, exp_n + u64_t'(i), cm), cb, cm);
            arg_next = ref_addmod(arg, ca, cm);
            check(u64_t'(tuple_x[i]) == ref_inv(arg, cm),
                  $sformatf("n=%0d lane %0d x=%0d exp=%0d", exp_n, i, tuple_x[i], ref_inv(arg, cm)));
            if (have_prev && i > 0)
              check(tuple_x[i-1] == prev_x[i], "x_n^(i-1) != x_(n-1)^i");
            if (arg == 0) n_zero++;
            if (arg_next < arg) n_wrap++;
          end
          prev_x     <= tuple_x;
          have_prev  <= 1'b1;
          exp_n      = exp_n + 1;
          tuples++;
          t_take     <= cyc;
          stalled    <= 1'b0;
          after_load <= 1'b0;
        end
      end
    end
  end

  // Host ready: high most of the time, low in bursts.
  always @(negedge clk) tuple_ready <= ($urandom_range(0, 4) != 0);

  task automatic configure(input u64_t ai, input u64_t bv, input u64_t mi, input u64_t ni);
    @(negedge clk);
    cfg_a = W'(ai); cfg_b = W'(bv); cfg_m = W'(mi); cfg_n0 = NW'(ni);
    cfg_load = 1'b1;
    ca = ai; cb = bv; cm = mi; exp_n = ni;
    @(negedge clk);
    cfg_load = 1'b0;
  endtask

  task automatic collect(input int count);
    int target;
    target = tuples + count;
    while (tuples < target) @(negedge clk);
  endtask

  initial begin
    u64_t ai, ni;
    rst_n = 1'b0; cfg_load = 1'b0;
    cfg_a = '0; cfg_b = '0; cfg_m = '0; cfg_n0 = '0;
    tuples = 0; timed = 0;
    n_join_wait = 0; n_backpressure = 0; n_zero = 0; n_wrap = 0;
    n_seek = 0; n_reload = 0; n_other_mod = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Family modulo 2^31 - 1 from index 0.
    configure(ref_rand_below(M31 - 1) + 1, ref_rand_below(M31), M31, 0);
    collect(600);

    // Start at an arbitrary index; lane 3 meets a zero argument at n0 + 7.
    ai = ref_rand_below(M31 - 1) + 1;
    ni = {32'd0, $urandom()} & 64'h7FFF_FFFF;
    configure(ai, (M31 - ref_mulmod(ai, ni + 7 + 3, M31)) % M31, M31, ni);
    collect(300);

    // Reload in the middle of a run, to another prime modulus.
    repeat (17) @(negedge clk);
    configure(ref_rand_below(1000002) + 1, ref_rand_below(1000003), 1000003, 5);
    collect(300);

    check(n_join_wait    > 0, "streams never waited at the join");
    check(n_backpressure > 0, "host back-pressure never happened");
    check(n_zero         > 0, "zero argument never happened");
    check(n_wrap         > 0, "argument never wrapped modulo m");
    check(n_seek         > 0, "no start at an arbitrary index");
    check(n_reload       > 0, "no reload while running");
    check(n_other_mod    > 0, "no modulus other than 2^31-1");
    check(timed          > 0, "no stall-free tuple interval timed");
    $display("picg_top: %0d tuples in %0d cycles; join waits %0d, back-pressure %0d, zero %0d, wrap %0d, seek %0d, reload %0d, other modulus %0d, timed %0d",
             tuples, cyc, n_join_wait, n_backpressure, n_zero, n_wrap, n_seek, n_reload, n_other_mod, timed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
