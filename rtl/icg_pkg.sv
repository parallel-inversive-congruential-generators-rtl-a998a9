// icg_pkg: constants shared by the inversive congruential generator blocks.
//
// The register width of 31 bits and the Mersenne prime modulus 2^31 - 1 are
// the configuration of the original FPGA inverter. Every block also takes the
// width as a parameter, and the modulus as a run-time input, so any odd prime
// that fits in WIDTH bits can be used.
package icg_pkg;

  // Width of the operand, modulus and result registers.
  localparam int unsigned ICG_WIDTH = 31;

  // Default modulus: the Mersenne prime 2^31 - 1.
  localparam logic [ICG_WIDTH-1:0] ICG_M31 = {ICG_WIDTH{1'b1}};

  // Width of the stream index counter n (a choice of this design).
  localparam int unsigned ICG_IDXW = 32;

endpackage
