// csum: complex stochastic weighted summer, z = 0.5*a + 0.5*b.
//
// Each part is a 2:1 multiplexer: input 0 takes a, input 1 takes b. The real
// multiplexer is steered by the select stream sel_im (SN_I(0.5)) and the
// imaginary one by sel_re (SN_R(0.5)), as in the source drawing. When a select
// stream is 1 with probability 0.5 and independent of the data, the output
// probability is the mean of the two inputs, i.e. the bipolar value halves the
// sum and cannot overflow.
//
// Interface: combinational, one stream bit per part per cycle. Both select
// inputs may carry the same stream.
module csum (
  input  sc_pkg::cstream_t a,
  input  sc_pkg::cstream_t b,
  input  logic             sel_re,
  input  logic             sel_im,
  output sc_pkg::cstream_t z
);

  always_comb begin
    z.re = sel_im ? b.re : a.re;
    z.im = sel_re ? b.im : a.im;
  end

endmodule
