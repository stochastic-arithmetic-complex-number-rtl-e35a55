// sc_pkg: shared constants and types of the stochastic complex sum-of-products
// circuit.
//
// A complex stochastic number travels as two single-bit bipolar streams, one
// for the real and one for the imaginary part (cstream_t). A part whose line is
// at logic 1 with probability p stands for the value 2p-1 (full scale V = 1).
// Binary numbers are N = 8 bits wide. The SNG comparator outputs 1 when the
// random number is greater than the binary code, so a code c maps to
// p = (2^N-1-c)/(2^N-1) and value (2^N-1-2c)/(2^N-1): code 0 is +1, code 255
// is -1 and the ADDIE decoder returns its result in the same code.
//
// The word width, the LFSR polynomial x^8+x^6+x^5+x^4+1 and both seeds
// (10000000 for LFSR1, 10111110 for LFSR2) follow the source design. The
// ADDIE start value is this design's own choice.
package sc_pkg;

  // Width of the binary numbers and of the random numbers.
  localparam int unsigned DATA_W = 8;

  // Feedback taps of x^8+x^6+x^5+x^4+1: state bits 7, 5, 4 and 3.
  localparam logic [DATA_W-1:0] LFSR_TAPS  = 8'b1011_1000;
  // Seed of the LFSR that drives the SNGs and the ADDIEs.
  localparam logic [DATA_W-1:0] LFSR1_SEED = 8'b1000_0000;
  // Seed of the LFSR that drives the multiplexers, the result of the seed search.
  localparam logic [DATA_W-1:0] LFSR2_SEED = 8'b1011_1110;
  // ADDIE counter value after reset: mid scale, value close to 0.
  localparam logic [DATA_W-1:0] ADDIE_INIT = 8'd128;

  // Number of product terms of the sum of products.
  localparam int unsigned TERMS = 4;

  // One complex stochastic number: one bit of each part per clock cycle.
  typedef struct packed {
    logic re;
    logic im;
  } cstream_t;

endpackage
