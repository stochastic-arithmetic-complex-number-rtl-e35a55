// csng: complex stochastic number generator with a shared random number.
//
// Converts an N-bit complex binary number (re, im) into a complex stochastic
// number: two comparators, one per part, both fed by the same random number
// rnd. Sharing the random number makes the two output streams fully
// correlated, which is harmless as long as no later operator combines the real
// and imaginary parts of the same number with each other.
//
// Interface: rnd from an LFSR, re/im binary codes (see sc_pkg for the code to
// value mapping), z the two stream bits. Combinational, one bit per part per
// clock cycle of the LFSR.
//
// The structure (shared RNG, two x > y comparators) follows the source design.
module csng #(
  parameter int unsigned N = sc_pkg::DATA_W
) (
  input  logic [N-1:0]     rnd,
  input  logic [N-1:0]     re,
  input  logic [N-1:0]     im,
  output sc_pkg::cstream_t z
);

  sng #(.N(N)) u_sng_re (.rnd(rnd), .val(re), .s(z.re));
  sng #(.N(N)) u_sng_im (.rnd(rnd), .val(im), .s(z.im));

endmodule
