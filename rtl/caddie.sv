// caddie: parallel complex decoder built from two ADDIEs.
//
// The real and imaginary streams of a complex stochastic number each feed an
// ADDIE; both ADDIEs take the same random number. The outputs are the two
// N-bit counters, in the SNG code of sc_pkg.
//
// Interface: synchronous active-high init restarts both counters at INIT;
// z_re/z_im are registered and change by at most one per cycle.
//
// Two parallel ADDIEs sharing one random number follow the source design.
module caddie #(
  parameter int unsigned  N    = sc_pkg::DATA_W,
  parameter logic [N-1:0] INIT = sc_pkg::ADDIE_INIT
) (
  input  logic             clk,
  input  logic             init,
  input  sc_pkg::cstream_t s,
  input  logic [N-1:0]     rnd,
  output logic [N-1:0]     z_re,
  output logic [N-1:0]     z_im
);

  logic fb_re, fb_im;

  addie #(.N(N), .INIT(INIT)) u_addie_re (
    .clk(clk), .init(init), .in_bit(s.re), .rnd(rnd), .cnt(z_re), .fb(fb_re)
  );
  addie #(.N(N), .INIT(INIT)) u_addie_im (
    .clk(clk), .init(init), .in_bit(s.im), .rnd(rnd), .cnt(z_im), .fb(fb_im)
  );

endmodule
