// eicg_stream: one explicit inversive congruential generator stream,
// x_n = inv(a*n + b) mod m, for n = n0, n0+1, n0+2, ...
//
// A load pulse takes a new (a, b, m, n0). The argument a*n0 + b mod m is first
// formed by the bit-serial multiplier modmul (so the stream can start at any
// point of its cycle); from then on the argument of the next index is the
// previous one plus a mod m, a single modular addition. Each argument is handed
// to the binary extended Euclidean inverter modinv, and its result leaves with
// the index n it belongs to. The generator is the document's explicit formula;
// the incremental argument update and the seeding multiplier are this design's
// way of evaluating it.
//
// Interface: load (one cycle) restarts the stream and aborts any work in
// flight; a, b below m, m an odd prime. Results are offered with out_valid /
// out_ready and held until taken. inv_cycles is the step count of the result
// on x.
// Timing: NW + 2 cycles of seeding after load, then one number every
// (inversion steps + 3) cycles when the consumer never stalls.
module eicg_stream #(
  parameter int unsigned WIDTH = icg_pkg::ICG_WIDTH,
  parameter int unsigned NW    = icg_pkg::ICG_IDXW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] m,
  input  logic [NW-1:0]    n0,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] x,
  output logic [NW-1:0]    n,
  output logic [7:0]       inv_cycles,
  output logic             running
);

  typedef enum logic [1:0] {S_IDLE, S_SEED, S_RUN} state_t;

  state_t           state;
  logic [WIDTH-1:0] areg, mreg, arg;
  logic [NW-1:0]    n_next;
  logic             seed_req;

  logic             mm_in_ready, mm_out_valid;
  logic [WIDTH-1:0] mm_p;
  logic             mi_in_valid, mi_in_ready;

  function automatic logic [WIDTH-1:0] add_mod(input logic [WIDTH-1:0] p,
                                               input logic [WIDTH-1:0] q,
                                               input logic [WIDTH-1:0] md);
    logic [WIDTH:0] s;
    s = {1'b0, p} + {1'b0, q};
    return (s >= {1'b0, md}) ? WIDTH'(s - {1'b0, md}) : WIDTH'(s);
  endfunction

  modmul #(.WIDTH(WIDTH), .NW(NW)) u_seed (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (load),
    .in_valid  (seed_req),
    .in_ready  (mm_in_ready),
    .a         (areg),
    .n         (n_next),
    .c         (arg),
    .m         (mreg),
    .out_valid (mm_out_valid),
    .out_ready (1'b1),
    .p         (mm_p)
  );

  assign mi_in_valid = (state == S_RUN);
  assign running     = (state != S_IDLE);

  modinv #(.WIDTH(WIDTH)) u_inv (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (load),
    .in_valid  (mi_in_valid),
    .in_ready  (mi_in_ready),
    .x         (arg),
    .m         (mreg),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .inv       (x),
    .cycles    (inv_cycles)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      areg     <= '0;
      mreg     <= '0;
      arg      <= '0;
      n_next   <= '0;
      n        <= '0;
      seed_req <= 1'b0;
    end else if (load) begin
      // arg holds b until the seed multiplier has added it to a*n0.
      state    <= S_SEED;
      areg     <= a;
      mreg     <= m;
      arg      <= b;
      n_next   <= n0;
      seed_req <= 1'b1;
    end else begin
      unique case (state)
        S_SEED: begin
          if (seed_req && mm_in_ready) seed_req <= 1'b0;
          if (mm_out_valid) begin
            arg   <= mm_p;
            state <= S_RUN;
          end
        end
        S_RUN: if (mi_in_ready) begin
          arg    <= add_mod(arg, areg, mreg);
          n      <= n_next;
          n_next <= n_next + 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
