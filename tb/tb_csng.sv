// tb_csng: self-checking test of the complex SNG.
//
// Drives random numbers and codes and compares both output bits with the
// comparison rnd > code worked out in the testbench. Then, for a set of codes,
// runs the random number through all 255 non-zero values (one LFSR period) and
// checks that each part is 1 exactly 255-code times, i.e. that the stream has
// probability (255-code)/255 as the bipolar code mapping requires.
module tb_csng;

  logic [7:0]       rnd, re, im;
  sc_pkg::cstream_t z;
  int               checks = 0, failures = 0;
  logic             clk = 1'b0;

  always #5 clk = ~clk;

  csng dut (.rnd(rnd), .re(re), .im(im), .z(z));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones_re, ones_im;
    for (int k = 0; k < 4000; k++) begin
      rnd = 8'($urandom);
      re  = 8'($urandom);
      im  = (k % 7 == 0) ? rnd : 8'($urandom);
      #1;
      check(z.re == (int'(rnd) > int'(re)), $sformatf("re: rnd=%0d code=%0d", rnd, re));
      check(z.im == (int'(rnd) > int'(im)), $sformatf("im: rnd=%0d code=%0d", rnd, im));
    end
    for (int c = 0; c < 256; c += 15) begin
      re = 8'(c);
      im = 8'(255 - c);
      ones_re = 0;
      ones_im = 0;
      for (int r = 1; r < 256; r++) begin
        rnd = 8'(r);
        #1;
        ones_re += int'(z.re);
        ones_im += int'(z.im);
      end
      check(ones_re == 255 - c, $sformatf("re ones for code %0d: %0d", c, ones_re));
      check(ones_im == c, $sformatf("im ones for code %0d: %0d", 255 - c, ones_im));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
