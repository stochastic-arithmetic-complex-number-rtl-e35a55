// tb_sc_sop_top: end-to-end test of the stochastic complex sum of products at
// its default parameters.
//
// Runs 64 random operand sets (plus three corner sets) through the circuit,
// each with a 16384-cycle stream. A cycle-exact reference model, written here
// from the circuit description (LFSR recurrence, 4-bit rotation, comparators,
// XNOR products, multiplexers on LFSR2 bits 0/3/5, ADDIE counters), is compared
// with the output stream z_s and the ADDIE outputs z_re/z_im in every cycle.
// Independently of the model, the mean of the output stream must be close to
// the ideal value f/8 = (1/8) * sum x[n]*y[n] computed in floating point, and
// so must the final ADDIE outputs. The RMSE of the final ADDIE outputs over
// the 64 random sets is printed on the scale of f (8 times the output) and
// must stay well below the 1.5 that sharing a single LFSR gives.
// Mechanisms that must each occur: load, reset, CS4 rotation giving a y random
// number different from the x one, both values of each of the three select
// bits, ADDIE up and down steps, ADDIE saturation.
module tb_sc_sop_top;

  localparam int LEN  = 16384;
  localparam int RUNS = 64;

  logic             clk = 1'b0;
  logic             rst, load;
  logic [7:0]       x_re [4], x_im [4], y_re [4], y_im [4];
  sc_pkg::cstream_t z_s;
  logic [7:0]       z_re, z_im;

  int checks = 0, failures = 0;
  int n_load = 0, n_rst = 0, n_rot_diff = 0, n_up = 0, n_down = 0, n_sat = 0;
  int n_sel [3][2];

  always #5 clk = ~clk;

  sc_sop_top dut (
    .clk(clk), .rst(rst), .load(load),
    .x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im),
    .z_s(z_s), .z_re(z_re), .z_im(z_im)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (RUNS * (LEN + 10) + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [7:0] mx_re [4], mx_im [4], my_re [4], my_im [4];
  logic [7:0] m1, m2, mc_re, mc_im;

  function automatic logic [7:0] lfsr_step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [7:0] addie_step(logic [7:0] c, logic in_bit, logic [7:0] r);
    logic f;
    f = r > c;
    if (in_bit && !f && c != 8'd0)   return c - 8'd1;
    if (!in_bit && f && c != 8'd255) return c + 8'd1;
    return c;
  endfunction

  // Output stream bits of the model for the current state.
  function automatic logic [1:0] model_stream();
    logic [7:0] r, ry;
    logic       s1, s2, s3;
    logic [1:0] p [4];
    logic [1:0] q01, q23;
    r  = m1;
    ry = {r[3:0], r[7:4]};
    s1 = m2[0];
    s2 = m2[3];
    s3 = m2[5];
    for (int n = 0; n < 4; n++) begin
      logic a_r, a_i, b_r, b_i;
      a_r = r  > mx_re[n];
      a_i = r  > mx_im[n];
      b_r = ry > my_re[n];
      b_i = ry > my_im[n];
      p[n][1] = s1 ? (a_i ^ b_i) : ~(a_r ^ b_r);
      p[n][0] = s1 ? ~(a_i ^ b_r) : ~(a_r ^ b_i);
    end
    q01 = {s2 ? p[1][1] : p[0][1], s2 ? p[1][0] : p[0][0]};
    q23 = {s2 ? p[3][1] : p[2][1], s2 ? p[3][0] : p[2][0]};
    return {s3 ? q23[1] : q01[1], s3 ? q23[0] : q01[0]};
  endfunction

  function automatic real code2val(logic [7:0] c);
    return (255.0 - 2.0 * c) / 255.0;
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Apply a one-cycle load (or reset) and restart the model.
  task automatic start(bit use_rst);
    if (use_rst) rst = 1'b1; else load = 1'b1;
    @(posedge clk); #1;
    rst  = 1'b0;
    load = 1'b0;
    if (use_rst) begin
      n_rst++;
      foreach (mx_re[n]) begin
        mx_re[n] = '0; mx_im[n] = '0; my_re[n] = '0; my_im[n] = '0;
      end
    end else begin
      n_load++;
      mx_re = x_re; mx_im = x_im; my_re = y_re; my_im = y_im;
    end
    m1    = 8'h80;
    m2    = 8'hBE;
    mc_re = 8'd128;
    mc_im = 8'd128;
    check(z_re == 8'd128 && z_im == 8'd128, "ADDIEs restart at mid scale");
  endtask

  // Run len cycles, checking against the model; return the stream means.
  task automatic run(int len, output real mean_re, output real mean_im);
    logic [1:0] e;
    logic [7:0] nre, nim;
    int         acc_re = 0, acc_im = 0;
    for (int k = 0; k < len; k++) begin
      e = model_stream();
      check({z_s.re, z_s.im} == e, $sformatf("cycle %0d stream %b expected %b",
                                             k, {z_s.re, z_s.im}, e));
      acc_re += z_s.re ? 1 : -1;
      acc_im += z_s.im ? 1 : -1;
      if ({m1[3:0], m1[7:4]} != m1) n_rot_diff++;
      n_sel[0][m2[0]]++;
      n_sel[1][m2[3]]++;
      n_sel[2][m2[5]]++;
      nre = addie_step(mc_re, z_s.re, m1);
      nim = addie_step(mc_im, z_s.im, m1);
      if (nre > mc_re) n_up++;
      if (nre < mc_re) n_down++;
      if (nre == mc_re && (mc_re == 8'd0 || mc_re == 8'd255)) n_sat++;
      if (nim == mc_im && (mc_im == 8'd0 || mc_im == 8'd255)) n_sat++;
      mc_re = nre;
      mc_im = nim;
      m1 = lfsr_step(m1);
      m2 = lfsr_step(m2);
      @(posedge clk); #1;
      check(z_re == mc_re && z_im == mc_im,
            $sformatf("cycle %0d ADDIE %0d/%0d expected %0d/%0d", k, z_re, z_im, mc_re, mc_im));
    end
    mean_re = real'(acc_re) / len;
    mean_im = real'(acc_im) / len;
  endtask

  // Ideal f/8 of the operands now on the inputs.
  task automatic ideal(output real f_re, output real f_im);
    f_re = 0.0;
    f_im = 0.0;
    for (int n = 0; n < 4; n++) begin
      real ar, ai, br, bi;
      ar = code2val(x_re[n]); ai = code2val(x_im[n]);
      br = code2val(y_re[n]); bi = code2val(y_im[n]);
      f_re += ar * br - ai * bi;
      f_im += ar * bi + ai * br;
    end
    f_re /= 8.0;
    f_im /= 8.0;
  endtask

  // One complete computation with tolerance checks; returns squared error.
  task automatic compute(string tag, real tol_stream, real tol_addie,
                         output real err2, output real err2_s);
    real f_re, f_im, s_re, s_im, a_re, a_im;
    ideal(f_re, f_im);
    start(1'b0);
    run(LEN, s_re, s_im);
    a_re = code2val(z_re);
    a_im = code2val(z_im);
    check(absr(s_re - f_re) < tol_stream && absr(s_im - f_im) < tol_stream,
          $sformatf("%s stream mean (%f, %f) ideal (%f, %f)", tag, s_re, s_im, f_re, f_im));
    check(absr(a_re - f_re) < tol_addie && absr(a_im - f_im) < tol_addie,
          $sformatf("%s ADDIE (%f, %f) ideal (%f, %f)", tag, a_re, a_im, f_re, f_im));
    err2   = (a_re - f_re) ** 2 + (a_im - f_im) ** 2;
    err2_s = (s_re - f_re) ** 2 + (s_im - f_im) ** 2;
  endtask

  initial begin
    real err2, err2_s, sum2, sum2_s, worst, m_re, m_im, rmse_a, rmse_s;
    rst  = 1'b0;
    load = 1'b0;
    foreach (n_sel[i, j]) n_sel[i][j] = 0;
    foreach (x_re[n]) begin
      x_re[n] = '0; x_im[n] = '0; y_re[n] = '0; y_im[n] = '0;
    end
    start(1'b1);
    run(300, m_re, m_im);

    // Corner set 1: every operand 1+i, f/8 = i; the imaginary stream is all ones.
    compute("all 1+i", 0.02, 0.08, err2, err2_s);
    check(z_im == 8'd0, "imaginary ADDIE saturates at +1");
    // Corner set 2: x = 1-i, y = 1+i, each product 2, f/8 = 1.
    foreach (x_re[n]) begin
      x_re[n] = 8'd0; x_im[n] = 8'd255; y_re[n] = 8'd0; y_im[n] = 8'd0;
    end
    compute("x=1-i y=1+i", 0.02, 0.08, err2, err2_s);
    // Corner set 3: all operands about zero.
    foreach (x_re[n]) begin
      x_re[n] = 8'd127; x_im[n] = 8'd128; y_re[n] = 8'd128; y_im[n] = 8'd127;
    end
    compute("zero", 0.12, 0.2, err2, err2_s);

    sum2   = 0.0;
    sum2_s = 0.0;
    worst  = 0.0;
    for (int r = 0; r < RUNS; r++) begin
      foreach (x_re[n]) begin
        x_re[n] = 8'($urandom); x_im[n] = 8'($urandom);
        y_re[n] = 8'($urandom); y_im[n] = 8'($urandom);
      end
      compute($sformatf("run %0d", r), 0.12, 0.2, err2, err2_s);
      sum2   += err2;
      sum2_s += err2_s;
      if (err2 > worst) worst = err2;
    end
    // RMSE of the sum f itself (8 times the circuit output), full scale V = 1.
    rmse_a = 8.0 * $sqrt(sum2 / RUNS);
    rmse_s = 8.0 * $sqrt(sum2_s / RUNS);
    $display("RMSE of f over %0d runs: ADDIE output %f, stream mean %f; worst ADDIE error %f",
             RUNS, rmse_a, rmse_s, 8.0 * $sqrt(worst));
    // Sharing one LFSR for everything gives an RMSE of about 1.5 on this scale;
    // the two-LFSR circuit with the searched seed must do clearly better.
    check(rmse_s < 0.8, $sformatf("stream RMSE %f below 0.8", rmse_s));
    check(rmse_a < 1.2, $sformatf("ADDIE RMSE %f below 1.2", rmse_a));

    // Reset in the middle of a computation.
    load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    repeat (50) @(posedge clk);
    start(1'b1);
    run(200, m_re, m_im);

    check(n_load > 0,     $sformatf("loads: %0d", n_load));
    check(n_rst > 1,      $sformatf("resets: %0d", n_rst));
    check(n_rot_diff > 0, $sformatf("CS4 rotation changed the y random number: %0d", n_rot_diff));
    for (int i = 0; i < 3; i++)
      check(n_sel[i][0] > 0 && n_sel[i][1] > 0,
            $sformatf("level %0d select 0/1: %0d/%0d", i + 1, n_sel[i][0], n_sel[i][1]));
    check(n_up > 0 && n_down > 0, $sformatf("ADDIE up/down steps: %0d/%0d", n_up, n_down));
    check(n_sat > 0, $sformatf("ADDIE saturated cycles: %0d", n_sat));
    $display("mechanisms: load=%0d reset=%0d cs4=%0d sel1=%0d/%0d sel2=%0d/%0d sel3=%0d/%0d up=%0d down=%0d sat=%0d",
             n_load, n_rst, n_rot_diff, n_sel[0][0], n_sel[0][1], n_sel[1][0], n_sel[1][1],
             n_sel[2][0], n_sel[2][1], n_up, n_down, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
