// picg_top: parallel explicit inversive congruential generator.
//
// N streams x_n^i = inv(a*n + b^i) mod m, i = 1..N, share the multiplier a and
// the prime modulus m; their additive constants b^i = a*(i-1) + b mod m come
// from eicg_param, which makes the N-tuples (x_n^1, ..., x_n^N) statistically
// sound. Every stream has its own seeding multiplier and its own binary
// extended Euclidean inverter, so the N inversions of one index run side by
// side. Inversion time depends on the data, so the streams finish an index at
// different times; the top joins them: a tuple is offered only when every
// stream holds its number for that index, and all streams are released
// together when the tuple is taken. The family follows the document; one
// inverter per stream and the tuple join are this design's choices.
//
// Interface: cfg_load (one cycle) starts the family at index cfg_n0 with
// cfg_a, cfg_b, cfg_m (a, b below m, m an odd prime of at most WIDTH bits,
// 2^31 - 1 in the reference configuration). tuple_x[k] is x_n^(k+1) for
// index tuple_n, offered with tuple_valid / tuple_ready. lane_wait flags the
// streams that have finished the current index and wait for a slower one;
// tuple_cycles is the step count of the slowest inversion of the tuple.
// Timing: NW + 2 cycles of seeding, then one tuple per slowest-inversion
// time (at most about 2*WIDTH + 3 cycles) when tuple_ready stays high.
module picg_top #(
  parameter int unsigned WIDTH    = icg_pkg::ICG_WIDTH,
  parameter int unsigned NSTREAMS = 4,
  parameter int unsigned NW       = icg_pkg::ICG_IDXW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_load,
  input  logic [WIDTH-1:0] cfg_a,
  input  logic [WIDTH-1:0] cfg_b,
  input  logic [WIDTH-1:0] cfg_m,
  input  logic [NW-1:0]    cfg_n0,
  output logic             tuple_valid,
  input  logic             tuple_ready,
  output logic [WIDTH-1:0] tuple_x [NSTREAMS],
  output logic [NW-1:0]    tuple_n,
  output logic [NSTREAMS-1:0] lane_wait,
  output logic [7:0]       tuple_cycles,
  output logic             running
);

  logic [WIDTH-1:0]    bi [NSTREAMS];
  logic [NSTREAMS-1:0] lane_valid, lane_running;
  logic [NW-1:0]       lane_n [NSTREAMS];
  logic [7:0]          lane_cycles [NSTREAMS];
  logic                take;

  eicg_param #(.WIDTH(WIDTH), .NSTREAMS(NSTREAMS)) u_param (
    .a  (cfg_a),
    .b  (cfg_b),
    .m  (cfg_m),
    .bi (bi)
  );

  for (genvar k = 0; k < int'(NSTREAMS); k++) begin : g_lane
    eicg_stream #(.WIDTH(WIDTH), .NW(NW)) u_stream (
      .clk        (clk),
      .rst_n      (rst_n),
      .load       (cfg_load),
      .a          (cfg_a),
      .b          (bi[k]),
      .m          (cfg_m),
      .n0         (cfg_n0),
      .out_valid  (lane_valid[k]),
      .out_ready  (take),
      .x          (tuple_x[k]),
      .n          (lane_n[k]),
      .inv_cycles (lane_cycles[k]),
      .running    (lane_running[k])
    );
  end

  assign tuple_valid = &lane_valid;
  assign take        = tuple_valid & tuple_ready;
  assign tuple_n     = lane_n[0];
  assign lane_wait   = tuple_valid ? '0 : lane_valid;
  assign running     = |lane_running;

  always_comb begin
    tuple_cycles = '0;
    for (int k = 0; k < int'(NSTREAMS); k++)
      if (lane_cycles[k] > tuple_cycles) tuple_cycles = lane_cycles[k];
  end

  // All streams start together and advance only together, so a joined tuple
  // always carries one index.
  for (genvar k = 1; k < int'(NSTREAMS); k++) begin : g_chk
    a_same_index: assert property (@(posedge clk) disable iff (!rst_n)
                                   tuple_valid |-> lane_n[k] == lane_n[0]);
  end

endmodule
