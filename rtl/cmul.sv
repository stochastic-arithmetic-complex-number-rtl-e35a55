// cmul: complex stochastic multiplier, z = 0.5*a*b.
//
//   Re(z) = 0.5*Re(a)Re(b) - 0.5*Im(a)Im(b)
//   Im(z) = 0.5*Re(a)Im(b) + 0.5*Im(a)Re(b)
//
// A bipolar product of two independent streams is their XNOR. The four
// partial products are formed that way; Im(a)Im(b) is inverted, which negates
// a bipolar value, and each pair is summed with a 2:1 multiplexer whose select
// stream has p = 0.5, which supplies the factor 0.5. The real multiplexer is
// steered by sel_im (SN_I(0.5)), the imaginary one by sel_re (SN_R(0.5)).
//
// Interface: combinational, one stream bit per part per cycle. The operands
// must be uncorrelated with each other and the select streams uncorrelated
// with the data.
//
// The structure follows the source design; which multiplexer input carries
// which partial product is this design's choice (the first-named term on
// input 0).
module cmul (
  input  sc_pkg::cstream_t a,
  input  sc_pkg::cstream_t b,
  input  logic             sel_re,
  input  logic             sel_im,
  output sc_pkg::cstream_t z
);

  logic rr, ii, ri, ir;

  always_comb begin
    rr     = ~(a.re ^ b.re);
    ii     = ~(a.im ^ b.im);
    ri     = ~(a.re ^ b.im);
    ir     = ~(a.im ^ b.re);
    z.re   = sel_im ? ~ii    : rr;
    z.im   = sel_re ? ir     : ri;
  end

endmodule
