// lfsr: Fibonacci linear feedback shift register used as random number
// generator.
//
// Every clock cycle the register shifts one place towards its MSB and the XOR
// of the tapped bits enters at bit 0. With the default taps (bits 7, 5, 4, 3,
// polynomial x^8+x^6+x^5+x^4+1) the 8-bit register runs through all 255
// non-zero states before repeating. The whole state word q is the random
// number handed to the comparators; single bits of it serve as p = 0.5 select
// streams.
//
// Interface: synchronous active-high init loads SEED (use it as reset or to
// restart a computation); q is the registered state, valid from the cycle
// after init.
//
// The width, polynomial and seeds follow the source design; the Fibonacci
// form and the shift direction are this design's choice.
module lfsr #(
  parameter int unsigned       N    = sc_pkg::DATA_W,
  parameter logic [N-1:0]      TAPS = sc_pkg::LFSR_TAPS,
  parameter logic [N-1:0]      SEED = sc_pkg::LFSR1_SEED
) (
  input  logic         clk,
  input  logic         init,
  output logic [N-1:0] q
);

  logic feedback;

  assign feedback = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (init) q <= SEED;
    else      q <= {q[N-2:0], feedback};
  end

  // A zero state would lock the register.
  initial assert (SEED != '0) else $error("lfsr: SEED must not be zero");
  assert property (@(posedge clk) disable iff (init) q != '0)
    else $error("lfsr: register reached the all-zero state");

endmodule
