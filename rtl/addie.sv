// addie: ADaptive DIgital Element, stochastic-to-binary decoder.
//
// An N-bit saturating up/down counter whose value is turned back into a
// stream fb by the same comparator as the SNGs (fb = rnd > cnt). When the input
// stream bit is 1 and fb is 0 the counter steps down, when the input is 0 and
// fb is 1 it steps up, otherwise it holds. The counter settles where fb has the
// input's probability, so cnt tracks the input in the SNG code (see sc_pkg):
// a lower count stands for a higher probability.
//
// Interface: synchronous active-high init sets the counter to INIT; rnd is the
// random number (shared with the SNGs in the full circuit); cnt is registered
// and moves by at most one step per cycle.
//
// The element and its random-number input follow the source design; the
// counter orientation, saturation and INIT value are this design's choice.
module addie #(
  parameter int unsigned  N    = sc_pkg::DATA_W,
  parameter logic [N-1:0] INIT = sc_pkg::ADDIE_INIT
) (
  input  logic         clk,
  input  logic         init,
  input  logic         in_bit,
  input  logic [N-1:0] rnd,
  output logic [N-1:0] cnt,
  output logic         fb
);

  assign fb = (rnd > cnt);

  always_ff @(posedge clk) begin
    if (init) begin
      cnt <= INIT;
    end else if (in_bit && !fb) begin
      if (cnt != '0) cnt <= cnt - 1'b1;
    end else if (!in_bit && fb) begin
      if (cnt != '1) cnt <= cnt + 1'b1;
    end
  end

endmodule
