// tb_ls_estimate_workload: the 40-tap least-squares channel estimate at full
// size (M = 40 taps, 20 per channel; N = 160 training samples).
//
// Unlike the unit test, which uses random coefficients, this bench computes a
// true pseudo-inverse.  It draws QPSK training sequences for the two transmit
// antennas and builds their convolution matrix S (N x 40: row n holds
// t1[n..n-19] followed by t2[n..n-19]).  It then solves
// pinv(S) = (S^H S)^-1 S^H in double precision by Gauss-Jordan elimination and
// scales it to 16-bit coefficients (2^CQ).  It picks two random decaying
// 20-tap channels h1 and h2, forms the received training window
// Y = S [h1; h2] (with and without noise) and quantises it to 16 bits (2^YQ).
// Both scales are chosen from the actual values, so that no partial sum of the
// 32-bit accumulators can overflow.
//
// Checked:
//   - each of the 40 stored taps equals the exact integer product
//     pinv(S)_q * Y_q computed here (bit-exact);
//   - each tap, divided by 2^(CQ+YQ), matches the floating-point least-squares
//     estimate within 0.01, and for the noiseless window the true channel;
//   - the estimate is stored within one symbol period (5 samples) of the last
//     training sample;
//   - the CPU read-back of the channel store.
// The estimator runs with its default parameters.
module tb_ls_estimate_workload;
  import stbc_pkg::*;
  localparam int M = 40, N = 160, L = M / 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic coef_we = 0;
  logic [$clog2(M)-1:0] coef_row = '0;
  logic [$clog2(N)-1:0] coef_col = '0;
  logic signed [15:0] coef_re = '0, coef_im = '0;
  logic train_active = 0, train_valid = 0;
  cplx_t train_sample = '0;
  logic est_valid;
  logic [31:0] est_count;
  logic signed [31:0] h_re [M];
  logic signed [31:0] h_im [M];
  logic rd_en = 0;
  logic [$clog2(M):0] rd_addr = '0;
  logic [31:0] rd_data;

  channel_estimator dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  function automatic int rnd(input real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction
  function automatic real urand();       // uniform in [-1, 1]
    return (real'($urandom % 20001) - 10000.0) / 10000.0;
  endfunction

  // training, convolution matrix, pseudo-inverse, channel
  real t1r [N+L], t1i [N+L], t2r [N+L], t2i [N+L];   // index n+L-1 holds t[n]
  real sr [N][M], si [N][M];
  real gr [M][2*M], gi [M][2*M];                      // [S^H S | I] -> [I | inv]
  real pr [M][N], pi_ [M][N];                         // pinv(S)
  real hr [M], hi [M];
  int  cq_re [M][N], cq_im [M][N];
  int  yq_re [N], yq_im [N];
  int  exp_re [M], exp_im [M];
  real ls_re [M], ls_im [M];
  int  CQ, YQ;

  task automatic build_pinv();
    real maxp, accr, acci, best, dr, di, den, xr, xi, fr, fi, tr, ti;
    int  piv;
    logic [31:0] rbits;
    for (int n = 0; n < N + L; n++) begin
      rbits = $urandom;              // one draw, four independent bits
      t1r[n] = rbits[20] ? 1.0 : -1.0; t1i[n] = rbits[21] ? 1.0 : -1.0;
      t2r[n] = rbits[22] ? 1.0 : -1.0; t2i[n] = rbits[23] ? 1.0 : -1.0;
    end
    for (int n = 0; n < N; n++)
      for (int k = 0; k < L; k++) begin
        sr[n][k]     = t1r[n - k + L - 1]; si[n][k]     = t1i[n - k + L - 1];
        sr[n][L + k] = t2r[n - k + L - 1]; si[n][L + k] = t2i[n - k + L - 1];
      end
    // G = S^H S, augmented with the identity
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) begin
        accr = 0.0; acci = 0.0;
        for (int n = 0; n < N; n++) begin
          // conj(S[n][a]) * S[n][b]
          accr += sr[n][a] * sr[n][b] + si[n][a] * si[n][b];
          acci += sr[n][a] * si[n][b] - si[n][a] * sr[n][b];
        end
        gr[a][b] = accr; gi[a][b] = acci;
        gr[a][M + b] = (a == b) ? 1.0 : 0.0; gi[a][M + b] = 0.0;
      end
    // Gauss-Jordan with partial pivoting
    for (int c = 0; c < M; c++) begin
      piv = c;
      best = 0.0;
      for (int r = c; r < M; r++)
        if (gr[r][c] * gr[r][c] + gi[r][c] * gi[r][c] > best) begin
          best = gr[r][c] * gr[r][c] + gi[r][c] * gi[r][c]; piv = r;
        end
      if (piv != c)
        for (int k = 0; k < 2 * M; k++) begin
          tr = gr[c][k]; ti = gi[c][k];
          gr[c][k] = gr[piv][k]; gi[c][k] = gi[piv][k];
          gr[piv][k] = tr; gi[piv][k] = ti;
        end
      // divide row c by its pivot
      dr = gr[c][c]; di = gi[c][c]; den = dr * dr + di * di;
      for (int k = 0; k < 2 * M; k++) begin
        xr = gr[c][k]; xi = gi[c][k];
        gr[c][k] = (xr * dr + xi * di) / den;
        gi[c][k] = (xi * dr - xr * di) / den;
      end
      for (int r = 0; r < M; r++)
        if (r != c) begin
          fr = gr[r][c]; fi = gi[r][c];
          for (int k = 0; k < 2 * M; k++) begin
            gr[r][k] = gr[r][k] - (fr * gr[c][k] - fi * gi[c][k]);
            gi[r][k] = gi[r][k] - (fr * gi[c][k] + fi * gr[c][k]);
          end
        end
    end
    // pinv = inv(G) S^H
    maxp = 0.0;
    for (int a = 0; a < M; a++)
      for (int n = 0; n < N; n++) begin
        accr = 0.0; acci = 0.0;
        for (int b = 0; b < M; b++) begin
          // inv[a][b] * conj(S[n][b])
          accr += gr[a][M + b] * sr[n][b] + gi[a][M + b] * si[n][b];
          acci += gi[a][M + b] * sr[n][b] - gr[a][M + b] * si[n][b];
        end
        pr[a][n] = accr; pi_[a][n] = acci;
        if (accr > maxp) maxp = accr;
        if (-accr > maxp) maxp = -accr;
        if (acci > maxp) maxp = acci;
        if (-acci > maxp) maxp = -acci;
      end
    CQ = 0;
    while (maxp * (2.0 ** (CQ + 1)) < 32000.0) CQ++;
    for (int a = 0; a < M; a++)
      for (int n = 0; n < N; n++) begin
        cq_re[a][n] = rnd(pr[a][n] * (2.0 ** CQ));
        cq_im[a][n] = rnd(pi_[a][n] * (2.0 ** CQ));
      end
    $display("pinv(S): max |coefficient| %f, scaled by 2^%0d", maxp, CQ);
  endtask

  // received window Y = S h (+ noise), its quantisation and the references
  task automatic make_window(input real noise);
    real yr [N], yi [N];
    real maxy;
    longint bound, br, bi, ar, ai, xr, xi, er, ei;
    real fr, fi;
    int q;
    maxy = 0.0;
    for (int n = 0; n < N; n++) begin
      yr[n] = noise * urand(); yi[n] = noise * urand();
      for (int j = 0; j < M; j++) begin
        yr[n] += sr[n][j] * hr[j] - si[n][j] * hi[j];
        yi[n] += sr[n][j] * hi[j] + si[n][j] * hr[j];
      end
      if (yr[n] > maxy) maxy = yr[n];
      if (-yr[n] > maxy) maxy = -yr[n];
      if (yi[n] > maxy) maxy = yi[n];
      if (-yi[n] > maxy) maxy = -yi[n];
    end
    // largest 16-bit scale whose worst-case partial sums stay below 2^31
    YQ = 0;
    forever begin
      q = YQ + 1;
      if (maxy * (2.0 ** q) >= 32000.0) break;
      bound = 0;
      for (int a = 0; a < M; a++) begin
        br = 0; bi = 0;
        for (int n = 0; n < N; n++) begin
          ar = (cq_re[a][n] < 0) ? -longint'(cq_re[a][n]) : longint'(cq_re[a][n]);
          ai = (cq_im[a][n] < 0) ? -longint'(cq_im[a][n]) : longint'(cq_im[a][n]);
          xr = longint'(rnd((yr[n] < 0 ? -yr[n] : yr[n]) * (2.0 ** q)));
          xi = longint'(rnd((yi[n] < 0 ? -yi[n] : yi[n]) * (2.0 ** q)));
          br += ar * xr + ai * xi;
          bi += ar * xi + ai * xr;
        end
        if (br > bound) bound = br;
        if (bi > bound) bound = bi;
      end
      if (bound >= 64'sd2147483647) break;
      YQ = q;
    end
    for (int n = 0; n < N; n++) begin
      yq_re[n] = rnd(yr[n] * (2.0 ** YQ));
      yq_im[n] = rnd(yi[n] * (2.0 ** YQ));
    end
    for (int a = 0; a < M; a++) begin
      er = 0; ei = 0;
      fr = 0.0; fi = 0.0;
      for (int n = 0; n < N; n++) begin
        er += longint'(cq_re[a][n]) * yq_re[n] - longint'(cq_im[a][n]) * yq_im[n];
        ei += longint'(cq_re[a][n]) * yq_im[n] + longint'(cq_im[a][n]) * yq_re[n];
        fr += pr[a][n] * yr[n] - pi_[a][n] * yi[n];
        fi += pr[a][n] * yi[n] + pi_[a][n] * yr[n];
      end
      exp_re[a] = int'(er); exp_im[a] = int'(ei);
      ls_re[a] = fr; ls_im[a] = fi;
    end
    $display("window: noise %f, max |y| %f, samples scaled by 2^%0d", noise, maxy, YQ);
  endtask

  int last_cycle = 0, n_est = 0;
  always @(posedge clk) if (rst_n && train_active && train_valid) last_cycle = cycle;

  task automatic run_window(input real noise, input bit vs_true);
    real worst, gr_, gi_, err, et;
    int t, tap;
    worst = 0.0;
    make_window(noise);
    @(negedge clk);
    train_active = 1;
    for (int n = 0; n < N; n++) begin
      train_valid = 1;
      train_sample.re = 16'(yq_re[n]);
      train_sample.im = 16'(yq_im[n]);
      @(negedge clk);
    end
    train_valid = 0;
    train_active = 0;
    begin
      t = 0;
      while (!est_valid && t < 20) begin @(posedge clk); t++; end
    end
    check(est_valid, "estimate produced");
    @(negedge clk);
    n_est++;
    check(cycle - last_cycle <= OSR, $sformatf("latency %0d clocks, one symbol is %0d", cycle - last_cycle, OSR));
    check(est_count == 32'(n_est), "estimate counter");
    for (int a = 0; a < M; a++) begin
      gr_ = real'(h_re[a]) / (2.0 ** (CQ + YQ));
      gi_ = real'(h_im[a]) / (2.0 ** (CQ + YQ));
      err = (gr_ - ls_re[a]) * (gr_ - ls_re[a]) + (gi_ - ls_im[a]) * (gi_ - ls_im[a]);
      check(h_re[a] == exp_re[a] && h_im[a] == exp_im[a],
            $sformatf("tap %0d %0d,%0d exp %0d,%0d", a, h_re[a], h_im[a], exp_re[a], exp_im[a]));
      check(err < 1.0e-4, $sformatf("tap %0d %f,%f vs least squares %f,%f", a, gr_, gi_, ls_re[a], ls_im[a]));
      if (vs_true) begin
        et = (gr_ - hr[a]) * (gr_ - hr[a]) + (gi_ - hi[a]) * (gi_ - hi[a]);
        check(et < 1.0e-4, $sformatf("tap %0d %f,%f vs channel %f,%f", a, gr_, gi_, hr[a], hi[a]));
      end
      if (err > worst) worst = err;
    end
    $display("estimate %0d: worst |hardware - least squares| = %f", n_est, $sqrt(worst));
    // CPU read-back of a few taps
    for (int k = 0; k < 4; k++) begin
      tap = (k * 13) % M;
      for (int part = 0; part < 2; part++) begin
        rd_en = 1; rd_addr = ($clog2(M)+1)'(tap * 2 + part);
        @(negedge clk);
        rd_en = 0;
        check(rd_data == ((part != 0) ? h_im[tap] : h_re[tap]), $sformatf("read-back tap %0d part %0d", tap, part));
      end
    end
  endtask

  real g;
  initial begin
    build_pinv();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // two decaying channels, 20 taps each
    for (int k = 0; k < L; k++) begin
      g = 0.5 * (0.8 ** k);
      hr[k] = g * urand();     hi[k] = g * urand();
      hr[L + k] = g * urand(); hi[L + k] = g * urand();
    end
    @(negedge clk);
    for (int a = 0; a < M; a++)
      for (int n = 0; n < N; n++) begin
        coef_we = 1;
        coef_row = ($clog2(M))'(a);
        coef_col = ($clog2(N))'(n);
        coef_re = 16'(cq_re[a][n]);
        coef_im = 16'(cq_im[a][n]);
        @(negedge clk);
      end
    coef_we = 0;
    repeat (3) @(negedge clk);
    run_window(0.0, 1'b1);
    repeat (7) @(negedge clk);
    run_window(0.05, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
