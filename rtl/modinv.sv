// modinv: multiplicative inverse modulo an odd prime by the binary extended
// Euclidean algorithm.
//
// The unit computes inv = x^-1 mod m, with 0 mapped to 0 as the inversive
// generators require. It uses no divider: only comparisons, subtractions,
// halving and a conditional addition of m, as in the binary variant of the
// extended Euclidean algorithm. Four registers carry the state:
//   u, v   : start as x and m; the pair is reduced until one of them is 1.
//   x1, x2 : Bezout coefficients, kept so that x1*x == u and x2*x == v (mod m).
// One step is made per clock cycle:
//   u even            : u  <- u/2,       x1 <- x1/2 mod m
//   else v even       : v  <- v/2,       x2 <- x2/2 mod m
//   else u >= v       : u  <- (u-v)/2,   x1 <- (x1-x2)/2 mod m
//   else              : v  <- (v-u)/2,   x2 <- (x2-x1)/2 mod m
// and the unit stops when u == 1 (result x1) or v == 1 (result x2). Halving a
// residue modulo odd m is r/2 when r is even and (r+m)/2 when it is odd.
// Merging the subtraction with the halving that always follows it (u-v is
// even when both are odd) is this design's choice; it bounds the run at about
// 2*WIDTH steps. If the operands share a factor (m not prime) u or v reaches 0
// and the unit returns 0 rather than looping.
//
// Interface: valid/ready on both sides. An operand is taken when in_valid and
// in_ready are high; the result is held on inv with out_valid until out_ready.
// The unit handles one operand at a time. x must be below m. clear aborts any
// operation in flight. cycles reports how many iteration cycles the last
// operation took (x = 0 takes none).
// Timing: accept cycle, then one cycle per step, then the result is presented
// on the next cycle; about 1 to 2*WIDTH+2 cycles from accept to out_valid.
module modinv #(
  parameter int unsigned WIDTH = icg_pkg::ICG_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] m,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] inv,
  output logic [7:0]       cycles
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  state_t           state;
  logic [WIDTH-1:0] u, v, x1, x2, mreg;
  logic [7:0]       cnt;

  // r/2 mod m for 0 <= r < m, m odd.
  function automatic logic [WIDTH-1:0] half_mod(input logic [WIDTH-1:0] r,
                                                input logic [WIDTH-1:0] md);
    logic [WIDTH:0] s;
    s = r[0] ? ({1'b0, r} + {1'b0, md}) : {1'b0, r};
    return WIDTH'(s >> 1);
  endfunction

  // (p - q) mod m for 0 <= p, q < m.
  function automatic logic [WIDTH-1:0] sub_mod(input logic [WIDTH-1:0] p,
                                               input logic [WIDTH-1:0] q,
                                               input logic [WIDTH-1:0] md);
    return (p >= q) ? (p - q) : (p - q + md);
  endfunction

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);

  logic [WIDTH-1:0] u_m_v, v_m_u;
  assign u_m_v = u - v;
  assign v_m_u = v - u;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      state  <= S_IDLE;
      u      <= '0;
      v      <= '0;
      x1     <= '0;
      x2     <= '0;
      mreg   <= '0;
      inv    <= '0;
      cnt    <= '0;
      cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          mreg <= m;
          u    <= x;
          v    <= m;
          x1   <= WIDTH'(1);
          x2   <= '0;
          cnt  <= '0;
          if (x == '0) begin
            inv    <= '0;
            cycles <= '0;
            state  <= S_DONE;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (u == WIDTH'(1) || v == WIDTH'(1) || u == '0 || v == '0) begin
            inv    <= (u == WIDTH'(1)) ? x1 : (v == WIDTH'(1)) ? x2 : '0;
            cycles <= cnt;
            state  <= S_DONE;
          end else begin
            cnt <= cnt + 8'd1;
            if (!u[0]) begin
              u  <= u >> 1;
              x1 <= half_mod(x1, mreg);
            end else if (!v[0]) begin
              v  <= v >> 1;
              x2 <= half_mod(x2, mreg);
            end else if (u >= v) begin
              u  <= u_m_v >> 1;
              x1 <= half_mod(sub_mod(x1, x2, mreg), mreg);
            end else begin
              v  <= v_m_u >> 1;
              x2 <= half_mod(sub_mod(x2, x1, mreg), mreg);
            end
          end
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The result must stay stable while it waits for the consumer.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clear)
                           out_valid && !out_ready |=> out_valid && $stable(inv));

endmodule
