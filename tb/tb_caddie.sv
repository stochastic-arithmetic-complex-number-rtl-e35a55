// tb_caddie: self-checking test of the complex ADDIE decoder.
//
// Feeds the two parts with independent random streams of known probability and
// a random number uniform over 1..255. Every cycle both counters are compared
// with a reference model of the element (step down on input 1 / feedback 0,
// up on input 0 / feedback 1, saturate at 0 and 255). After settling, the
// counters averaged over 8000 cycles must lie within 6 codes of 255*(1-p).
// Constant streams must drive the counters to 0 and 255 and hold them there,
// and init must restart both at mid scale (128) in the next cycle.
module tb_caddie;

  logic             clk = 1'b0;
  logic             init;
  sc_pkg::cstream_t s;
  logic [7:0]       rnd, z_re, z_im;
  logic [7:0]       m_re, m_im;
  int               checks = 0, failures = 0;
  int               n_up = 0, n_down = 0, n_hold = 0;

  always #5 clk = ~clk;

  caddie dut (.clk(clk), .init(init), .s(s), .rnd(rnd), .z_re(z_re), .z_im(z_im));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] ref_next(logic [7:0] c, logic in_bit, logic [7:0] r);
    logic f;
    f = r > c;
    if (in_bit && !f && c != 8'd0)   return c - 8'd1;
    if (!in_bit && f && c != 8'd255) return c + 8'd1;
    return c;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one cycle with stream probabilities p_re, p_im (in 1/1000) and
  // check the counters against the model after the clock edge.
  task automatic step(int p_re, int p_im);
    logic [7:0] n_re, n_im;
    s.re = ($urandom % 1000) < p_re;
    s.im = ($urandom % 1000) < p_im;
    rnd  = 8'(1 + $urandom % 255);
    n_re = ref_next(m_re, s.re, rnd);
    n_im = ref_next(m_im, s.im, rnd);
    if (n_re > m_re) n_up++; else if (n_re < m_re) n_down++; else n_hold++;
    @(posedge clk); #1;
    m_re = n_re;
    m_im = n_im;
    check(z_re == m_re && z_im == m_im,
          $sformatf("counters %0d/%0d expected %0d/%0d", z_re, z_im, m_re, m_im));
  endtask

  task automatic restart();
    init = 1'b1;
    @(posedge clk); #1;
    init = 1'b0;
    m_re = 8'd128;
    m_im = 8'd128;
    check(z_re == 8'd128 && z_im == 8'd128, "init loads mid scale");
  endtask

  initial begin
    int  probs [6] = '{100, 250, 500, 620, 800, 950};
    real acc_re, acc_im, e_re, e_im;
    s    = '0;
    rnd  = 8'd1;
    init = 1'b0;
    restart();
    foreach (probs[i]) begin
      for (int k = 0; k < 2000; k++) step(probs[i], 1000 - probs[i]);
      acc_re = 0.0;
      acc_im = 0.0;
      for (int k = 0; k < 8000; k++) begin
        step(probs[i], 1000 - probs[i]);
        acc_re += z_re;
        acc_im += z_im;
      end
      acc_re /= 8000.0;
      acc_im /= 8000.0;
      e_re = 255.0 * (1.0 - probs[i] / 1000.0);
      e_im = 255.0 * (probs[i] / 1000.0);
      check(acc_re - e_re < 6.0 && e_re - acc_re < 6.0,
            $sformatf("p=%0d: mean re %f expected %f", probs[i], acc_re, e_re));
      check(acc_im - e_im < 6.0 && e_im - acc_im < 6.0,
            $sformatf("p=%0d: mean im %f expected %f", probs[i], acc_im, e_im));
    end
    restart();
    for (int k = 0; k < 3000; k++) step(1000, 0);
    check(z_re == 8'd0 && z_im == 8'd255, "constant streams saturate the counters");
    for (int k = 0; k < 200; k++) step(1000, 0);
    check(z_re == 8'd0 && z_im == 8'd255, "saturated counters hold");
    restart();
    check(n_up > 0 && n_down > 0 && n_hold > 0, "up, down and hold steps all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
