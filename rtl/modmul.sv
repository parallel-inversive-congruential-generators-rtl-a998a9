// modmul: bit-serial modular multiply-add, p = (a*n + c) mod m.
//
// It places an explicit inversive generator at an arbitrary index n: the
// argument a*n + b of the generator is formed here once, after which a stream
// only adds a for each step. Following the shift-and-add style of modular
// arithmetic (no divider), the product is built MSB first by Horner's rule:
//   acc <- 2*acc mod m, then acc <- acc + a mod m if bit i of n is set,
// one bit of n per cycle, each modular reduction being a single conditional
// subtraction of m. A last cycle adds c. The multiplier structure is this
// design's choice; the document only asks that the generator can be evaluated
// at any point of its cycle.
//
// Interface: valid/ready handshake. Operands a, c must be below m (m odd or
// even, m >= 2); n is any NW-bit unsigned number. clear aborts.
// Timing: NW cycles of multiplication and one of addition; out_valid rises
// NW + 2 cycles after the cycle that accepted the operands, and the result is
// held until out_ready.
module modmul #(
  parameter int unsigned WIDTH = icg_pkg::ICG_WIDTH,
  parameter int unsigned NW    = icg_pkg::ICG_IDXW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [NW-1:0]    n,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] m,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] p
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_ADD, S_DONE} state_t;

  state_t           state;
  logic [WIDTH-1:0] areg, creg, mreg, acc;
  logic [NW-1:0]    nreg;
  logic [$clog2(NW+1)-1:0] bits_left;

  // (p + q) mod m for 0 <= p, q < m.
  function automatic logic [WIDTH-1:0] add_mod(input logic [WIDTH-1:0] lhs,
                                               input logic [WIDTH-1:0] rhs,
                                               input logic [WIDTH-1:0] md);
    logic [WIDTH:0] s;
    s = {1'b0, lhs} + {1'b0, rhs};
    return (s >= {1'b0, md}) ? WIDTH'(s - {1'b0, md}) : WIDTH'(s);
  endfunction

  logic [WIDTH-1:0] dbl, step;
  assign dbl  = add_mod(acc, acc, mreg);
  assign step = nreg[NW-1] ? add_mod(dbl, areg, mreg) : dbl;

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);
  assign p         = acc;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      state     <= S_IDLE;
      areg      <= '0;
      creg      <= '0;
      mreg      <= '0;
      nreg      <= '0;
      acc       <= '0;
      bits_left <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          areg      <= a;
          creg      <= c;
          mreg      <= m;
          nreg      <= n;
          acc       <= '0;
          bits_left <= ($clog2(NW+1))'(NW);
          state     <= S_MUL;
        end
        S_MUL: begin
          acc       <= step;
          nreg      <= nreg << 1;
          bits_left <= bits_left - 1'b1;
          if (bits_left == 1) state <= S_ADD;
        end
        S_ADD: begin
          acc   <= add_mod(acc, creg, mreg);
          state <= S_DONE;
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
