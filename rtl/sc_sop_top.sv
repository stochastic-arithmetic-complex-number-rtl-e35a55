// sc_sop_top: stochastic complex sum of products, f = sum_{n=0..3} x[n]*y[n].
//
// Eight complex numbers are loaded into input registers and turned into
// complex bipolar streams by eight complex SNGs. All SNGs share one 8-bit
// random number from LFSR1: the x SNGs take it as it is, the y SNGs take it
// rotated by 4 bits (CS4), which decorrelates each x[n] from its y[n]. Four
// complex multipliers (level 1), two complex summers (level 2) and one
// complex summer (level 3) form the tree; every level halves its result, so
// the output stream carries f/8. The multiplexers of level 1, 2 and 3 are
// steered by bits 0, 3 and 5 of a second LFSR with another seed; within a level
// the real and imaginary multiplexers of all operators share that bit. Two
// ADDIEs, driven by LFSR1 as well, turn the output stream back to 8-bit codes.
//
// Code to value mapping (see sc_pkg): value = (255 - 2*code)/255, so code 0 is
// +1 and code 255 is -1. After n cycles the ADDIE outputs z_re/z_im estimate
// the code of f/8; the raw output stream z_s lets a user average instead.
//
// Interface and timing: rst (synchronous, active high) clears the input
// registers and restarts both LFSRs and the ADDIEs. A one-cycle load pulse
// captures x_re/x_im/y_re/y_im and also restarts the LFSRs at their seeds and
// the ADDIEs at mid scale, so every computation is reproducible. The first
// stream bits of the new operands appear in the cycle after load; the ADDIEs
// need a few hundred cycles to settle (a computation in the source design uses
// 16384-bit streams). z_re/z_im are registered.
//
// Structure, widths, LFSR polynomial, seeds, the 4-bit rotation and the select
// bit positions follow the source design. The input registers (which together
// with the two LFSRs and two ADDIEs give 160 flip-flops), the load/reset
// protocol and the ADDIE start value are this design's own choices.
module sc_sop_top #(
  parameter int unsigned             N          = sc_pkg::DATA_W,
  parameter logic [N-1:0]            TAPS       = sc_pkg::LFSR_TAPS,
  parameter logic [N-1:0]            SEED1      = sc_pkg::LFSR1_SEED,
  parameter logic [N-1:0]            SEED2      = sc_pkg::LFSR2_SEED,
  parameter int unsigned             SHIFT      = 4,
  parameter int unsigned             SEL_BIT1   = 0,
  parameter int unsigned             SEL_BIT2   = 3,
  parameter int unsigned             SEL_BIT3   = 5,
  parameter logic [N-1:0]            ADDIE_INIT = sc_pkg::ADDIE_INIT
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       load,
  input  logic [N-1:0]               x_re [sc_pkg::TERMS],
  input  logic [N-1:0]               x_im [sc_pkg::TERMS],
  input  logic [N-1:0]               y_re [sc_pkg::TERMS],
  input  logic [N-1:0]               y_im [sc_pkg::TERMS],
  output sc_pkg::cstream_t           z_s,
  output logic [N-1:0]               z_re,
  output logic [N-1:0]               z_im
);

  import sc_pkg::*;

  // Input operand registers.
  logic [N-1:0] xr_q [TERMS];
  logic [N-1:0] xi_q [TERMS];
  logic [N-1:0] yr_q [TERMS];
  logic [N-1:0] yi_q [TERMS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < TERMS; n++) begin
        xr_q[n] <= '0;
        xi_q[n] <= '0;
        yr_q[n] <= '0;
        yi_q[n] <= '0;
      end
    end else if (load) begin
      xr_q <= x_re;
      xi_q <= x_im;
      yr_q <= y_re;
      yi_q <= y_im;
    end
  end

  // Random number generators.
  logic         restart;
  logic [N-1:0] rnd1, rnd1_cs, rnd2;

  assign restart = rst | load;

  lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED1)) u_lfsr1 (
    .clk(clk), .init(restart), .q(rnd1)
  );
  lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED2)) u_lfsr2 (
    .clk(clk), .init(restart), .q(rnd2)
  );

  // CS4: circular shift of the LFSR1 word for the y SNGs.
  if (SHIFT % N == 0) begin : g_no_shift
    assign rnd1_cs = rnd1;
  end else begin : g_shift
    assign rnd1_cs = {rnd1[N-1-(SHIFT%N):0], rnd1[N-1:N-(SHIFT%N)]};
  end

  // Multiplexer control streams of levels 1, 2 and 3.
  logic sel1, sel2, sel3;

  assign sel1 = rnd2[SEL_BIT1];
  assign sel2 = rnd2[SEL_BIT2];
  assign sel3 = rnd2[SEL_BIT3];

  // Level 0: complex SNGs. Level 1: complex multipliers.
  cstream_t xs [TERMS];
  cstream_t ys [TERMS];
  cstream_t ps [TERMS];

  for (genvar n = 0; n < TERMS; n++) begin : g_term
    csng #(.N(N)) u_csng_x (.rnd(rnd1),    .re(xr_q[n]), .im(xi_q[n]), .z(xs[n]));
    csng #(.N(N)) u_csng_y (.rnd(rnd1_cs), .re(yr_q[n]), .im(yi_q[n]), .z(ys[n]));
    cmul u_cmul (.a(xs[n]), .b(ys[n]), .sel_re(sel1), .sel_im(sel1), .z(ps[n]));
  end

  // Level 2 and level 3: complex summers.
  cstream_t s01, s23;

  csum u_sum01 (.a(ps[0]), .b(ps[1]), .sel_re(sel2), .sel_im(sel2), .z(s01));
  csum u_sum23 (.a(ps[2]), .b(ps[3]), .sel_re(sel2), .sel_im(sel2), .z(s23));
  csum u_sum3  (.a(s01),   .b(s23),   .sel_re(sel3), .sel_im(sel3), .z(z_s));

  // Output decoder.
  caddie #(.N(N), .INIT(ADDIE_INIT)) u_caddie (
    .clk(clk), .init(restart), .s(z_s), .rnd(rnd1), .z_re(z_re), .z_im(z_im)
  );

  initial begin
    assert (SEL_BIT1 < N && SEL_BIT2 < N && SEL_BIT3 < N)
      else $error("sc_sop_top: select bit outside the LFSR word");
  end

endmodule
