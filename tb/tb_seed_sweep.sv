// tb_seed_sweep: accuracy of the sum-of-products circuit for several LFSR2
// seeds, the experiment behind the choice of the default seed.
//
// Four copies of sc_sop_top run side by side on the same 64 random operand
// sets, 16384 cycles each. They differ only in the LFSR2 seed, given here by
// its distance d from the LFSR1 seed 10000000 along the LFSR sequence:
//   d = 0   10000000  both LFSRs identical (one shared random source)
//   d = 235 11110000  the seed used before the search
//   d = 127 01100010  an equally spaced choice (half the period)
//   d = 212 10111110  the searched seed, the default
// For each copy the RMSE of f = 8 * output, full scale 1, is computed from the
// mean of the output stream and from the final ADDIE outputs. Checks: the
// shared-source case is far worse than the rest (RMSE above 1.0), and the
// searched seed gives a lower stream RMSE than both the old seed and the
// equally spaced one.
module tb_seed_sweep;

  localparam int LEN  = 16384;
  localparam int RUNS = 64;
  localparam int K    = 4;
  localparam logic [7:0] SEEDS [K] = '{8'b1000_0000, 8'b1111_0000, 8'b0110_0010, 8'b1011_1110};
  localparam int         DIST  [K] = '{0, 235, 127, 212};

  logic             clk = 1'b0;
  logic             rst, load;
  logic [7:0]       x_re [4], x_im [4], y_re [4], y_im [4];
  sc_pkg::cstream_t z_s  [K];
  logic [7:0]       z_re [K], z_im [K];
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < K; k++) begin : g_dut
    sc_sop_top #(.SEED2(SEEDS[k])) dut (
      .clk(clk), .rst(rst), .load(load),
      .x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im),
      .z_s(z_s[k]), .z_re(z_re[k]), .z_im(z_im[k])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real code2val(logic [7:0] c);
    return (255.0 - 2.0 * c) / 255.0;
  endfunction

  initial begin
    repeat (RUNS * (LEN + 2) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum_s [K], sum_a [K], rmse_s [K], rmse_a [K];
    int  acc_re [K], acc_im [K];
    real f_re, f_im, m_re, m_im;
    rst  = 1'b1;
    load = 1'b0;
    foreach (x_re[n]) begin
      x_re[n] = '0; x_im[n] = '0; y_re[n] = '0; y_im[n] = '0;
    end
    @(posedge clk); #1;
    rst = 1'b0;
    foreach (sum_s[k]) begin
      sum_s[k] = 0.0;
      sum_a[k] = 0.0;
    end
    for (int r = 0; r < RUNS; r++) begin
      foreach (x_re[n]) begin
        x_re[n] = 8'($urandom); x_im[n] = 8'($urandom);
        y_re[n] = 8'($urandom); y_im[n] = 8'($urandom);
      end
      f_re = 0.0;
      f_im = 0.0;
      for (int n = 0; n < 4; n++) begin
        f_re += code2val(x_re[n]) * code2val(y_re[n]) - code2val(x_im[n]) * code2val(y_im[n]);
        f_im += code2val(x_re[n]) * code2val(y_im[n]) + code2val(x_im[n]) * code2val(y_re[n]);
      end
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      foreach (acc_re[k]) begin
        acc_re[k] = 0;
        acc_im[k] = 0;
      end
      for (int t = 0; t < LEN; t++) begin
        for (int k = 0; k < K; k++) begin
          acc_re[k] += z_s[k].re ? 1 : -1;
          acc_im[k] += z_s[k].im ? 1 : -1;
        end
        @(posedge clk); #1;
      end
      for (int k = 0; k < K; k++) begin
        m_re = 8.0 * acc_re[k] / LEN;
        m_im = 8.0 * acc_im[k] / LEN;
        sum_s[k] += (m_re - f_re) ** 2 + (m_im - f_im) ** 2;
        sum_a[k] += (8.0 * code2val(z_re[k]) - f_re) ** 2 + (8.0 * code2val(z_im[k]) - f_im) ** 2;
      end
    end
    for (int k = 0; k < K; k++) begin
      rmse_s[k] = $sqrt(sum_s[k] / RUNS);
      rmse_a[k] = $sqrt(sum_a[k] / RUNS);
      $display("LFSR2 seed %08b (d=%0d): RMSE stream mean %f, ADDIE %f",
               SEEDS[k], DIST[k], rmse_s[k], rmse_a[k]);
    end
    check(rmse_s[0] > 1.0, "one shared random source is far less accurate");
    check(rmse_s[3] < rmse_s[1], "searched seed beats the seed 11110000");
    check(rmse_s[3] < rmse_s[2], "searched seed beats the equally spaced seed");
    check(rmse_s[3] < 0.6, "searched seed stream RMSE below 0.6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
