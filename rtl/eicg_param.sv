// eicg_param: additive constants of a parallel family of explicit inversive
// generators.
//
// Stream i (i = 1..N) of the family uses x_n^i = inv(a*n + b^i) mod m with a
// common multiplier a and b^i = a*(i-1) + b mod m. This choice makes the
// products b^i * inv(a) = (i-1) + b*inv(a) distinct, the condition for good
// N-tuples. The constants are formed by a combinational chain of modular
// additions, b^1 = b and b^(i+1) = b^i + a mod m, each a WIDTH+1-bit add
// followed by a conditional subtraction of m; no multiplier is needed.
//
// Interface: a, b below m; bi[k] is the constant of stream k+1.
// Timing: combinational, NSTREAMS-1 modular adders deep.
module eicg_param #(
  parameter int unsigned WIDTH    = icg_pkg::ICG_WIDTH,
  parameter int unsigned NSTREAMS = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] m,
  output logic [WIDTH-1:0] bi [NSTREAMS]
);

  function automatic logic [WIDTH-1:0] add_mod(input logic [WIDTH-1:0] x,
                                               input logic [WIDTH-1:0] y,
                                               input logic [WIDTH-1:0] md);
    logic [WIDTH:0] s;
    s = {1'b0, x} + {1'b0, y};
    return (s >= {1'b0, md}) ? WIDTH'(s - {1'b0, md}) : WIDTH'(s);
  endfunction

  always_comb begin
    bi[0] = b;
    for (int k = 1; k < int'(NSTREAMS); k++)
      bi[k] = add_mod(bi[k-1], a, m);
  end

endmodule
