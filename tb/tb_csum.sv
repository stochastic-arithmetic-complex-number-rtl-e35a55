// tb_csum: self-checking test of the complex stochastic summer.
//
// Part 1 applies all 64 combinations of the six input bits: Re(z) must be
// Re(a) when sel_im is 0 and Re(b) when it is 1, Im(z) likewise with sel_re.
// Part 2 drives independent random streams and checks that the decoded output
// means are close to 0.5*a + 0.5*b.
module tb_csum;

  sc_pkg::cstream_t a, b, z;
  logic             sel_re, sel_im;
  int               checks = 0, failures = 0;
  logic             clk = 1'b0;

  always #5 clk = ~clk;

  csum dut (.a(a), .b(b), .sel_re(sel_re), .sel_im(sel_im), .z(z));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic stream_bit(real p);
    return ($urandom % 100000) < int'(p * 100000.0);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real va_re, va_im, vb_re, vb_im, m_re, m_im, e_re, e_im;
    int  len;
    for (int v = 0; v < 64; v++) begin
      {a.re, a.im, b.re, b.im, sel_re, sel_im} = 6'(v);
      #1;
      check(z.re == (sel_im ? b.re : a.re), $sformatf("re for input %b", v[5:0]));
      check(z.im == (sel_re ? b.im : a.im), $sformatf("im for input %b", v[5:0]));
    end
    len = 40000;
    for (int t = 0; t < 8; t++) begin
      va_re = ($urandom % 2001) / 1000.0 - 1.0;
      va_im = ($urandom % 2001) / 1000.0 - 1.0;
      vb_re = ($urandom % 2001) / 1000.0 - 1.0;
      vb_im = ($urandom % 2001) / 1000.0 - 1.0;
      m_re = 0.0;
      m_im = 0.0;
      for (int k = 0; k < len; k++) begin
        a.re = stream_bit((va_re + 1.0) / 2.0);
        a.im = stream_bit((va_im + 1.0) / 2.0);
        b.re = stream_bit((vb_re + 1.0) / 2.0);
        b.im = stream_bit((vb_im + 1.0) / 2.0);
        sel_re = 1'($urandom);
        sel_im = 1'($urandom);
        #1;
        m_re += z.re ? 1.0 : -1.0;
        m_im += z.im ? 1.0 : -1.0;
      end
      m_re /= len;
      m_im /= len;
      e_re = 0.5 * (va_re + vb_re);
      e_im = 0.5 * (va_im + vb_im);
      check((m_re - e_re) < 0.03 && (e_re - m_re) < 0.03,
            $sformatf("mean re %f expected %f", m_re, e_re));
      check((m_im - e_im) < 0.03 && (e_im - m_im) < 0.03,
            $sformatf("mean im %f expected %f", m_im, e_im));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
