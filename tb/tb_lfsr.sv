// tb_lfsr: self-checking test of the LFSR random number generator.
//
// Loads the default seed and compares every state with a reference step
// written from the polynomial x^8+x^6+x^5+x^4+1 (new bit 0 = q7^q5^q4^q3).
// Checks that q equals the seed in the cycle after init, that the sequence
// visits all 255 non-zero states exactly once per period and returns to the
// seed after 255 steps, and that a second init mid-run restarts it. Also runs
// a second instance with the LFSR2 seed.
module tb_lfsr;

  logic       clk = 1'b0;
  logic       init;
  logic [7:0] q1, q2;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut1 (.clk(clk), .init(init), .q(q1));
  lfsr #(.SEED(8'b1011_1110)) dut2 (.clk(clk), .init(init), .q(q2));

  function automatic logic [7:0] ref_step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m1, m2;
    bit         seen [256];
    init = 1'b1;
    @(posedge clk); #1;
    init = 1'b0;
    check(q1 == 8'h80, "LFSR1 holds its seed after init");
    check(q2 == 8'hBE, "LFSR2 holds its seed after init");
    m1 = q1;
    m2 = q2;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int k = 0; k < 255; k++) begin
      check(!seen[q1], $sformatf("state %02h repeats within a period", q1));
      seen[q1] = 1'b1;
      @(posedge clk); #1;
      m1 = ref_step(m1);
      m2 = ref_step(m2);
      check(q1 == m1, $sformatf("LFSR1 step %0d: got %02h expected %02h", k, q1, m1));
      check(q2 == m2, $sformatf("LFSR2 step %0d: got %02h expected %02h", k, q2, m2));
    end
    check(q1 == 8'h80, "LFSR1 period is 255");
    for (int i = 1; i < 256; i++) check(seen[i], $sformatf("state %02h visited", i));
    check(!seen[0], "zero state never visited");
    repeat (37) @(posedge clk);
    init = 1'b1;
    @(posedge clk); #1;
    init = 1'b0;
    check(q1 == 8'h80 && q2 == 8'hBE, "re-init restarts both registers");
    @(posedge clk); #1;
    check(q1 == ref_step(8'h80), "first step after re-init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
