// sng: stochastic number generator comparator.
//
// Compares an N-bit random number rnd with an N-bit binary code val and
// outputs 1 when rnd > val. With rnd running through the 2^N-1 non-zero states
// of a maximal LFSR, the output is 1 in 2^N-1-val of them, so its probability is
// (2^N-1-val)/(2^N-1). Purely combinational.
//
// The comparator and its orientation (random number on the x side of x > y)
// follow the source design.
module sng #(
  parameter int unsigned N = sc_pkg::DATA_W
) (
  input  logic [N-1:0] rnd,
  input  logic [N-1:0] val,
  output logic         s
);

  assign s = (rnd > val);

endmodule
