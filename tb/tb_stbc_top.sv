// tb_stbc_top: end-to-end test of the TR-STBC link at its default sizes.
//
// The CPU side of the test loads the transmitter's pattern memory (sync word,
// two training sequences, two data blocks) and the receiver's pinv(S)
// coefficient memories (random values), configures both, and starts two
// packets.  The transmit samples pass through a two-path channel model in this
// bench and come back as the receiver's decimated input:
//     r[n] = x1[n] + x1[n-1]/4 + x2[n]/2
// Checked against values computed here:
//   - every transmitted sample on both antennas (sync, training, the TR-STBC
//     blocks with their time-reversed -conj()/conj() copies);
//   - the sync hit position, the training window, the payload window length;
//   - the channel estimate, pinv(S) times the training window, both on the
//     output ports and read back through the CPU interface, and its latency;
//   - both matched-filter outputs for every payload sample, and the FWD 1 /
//     FWD 2 frame buffers (fill level, CPU reads, reversed decoder reads);
//   - the debug buffers of both sides;
//   - that each mechanism happened at least once.
module tb_stbc_top;
  import stbc_pkg::*;

  localparam int M = 40, TRAIN_SYMS = 32, SYNC_LEN = 32, DATA_SYMS = 256;
  localparam int N = TRAIN_SYMS * OSR;
  localparam int PKT = (SYNC_LEN + TRAIN_SYMS + 2*DATA_SYMS) * OSR;
  localparam int PAYLOAD = 2 * DATA_SYMS * OSR;
  localparam int L = M / 2;
  localparam int MF_SHIFT = 8;
  // pattern memory layout of the transmitter
  localparam int T1 = SYNC_LEN, T2 = SYNC_LEN + TRAIN_SYMS;
  localparam int D1 = SYNC_LEN + 2*TRAIN_SYMS, D2 = D1 + DATA_SYMS;
  localparam int USED = D2 + DATA_SYMS;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;        // a falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  cpu_req_t tx_cpu_req, rx_cpu_req;
  logic [31:0] tx_cpu_rdata, rx_cpu_rdata;
  logic tx_cpu_rvalid, rx_cpu_rvalid;
  logic tx_tick = 1;
  logic tx_valid, tx_done;
  cplx_t tx_ant1, tx_ant2;
  logic rx_valid = 0;
  cplx_t rx_sample = '0;
  logic rx_sync_hit, rx_payload_valid, rx_est_valid, rx_frame_done, rx_fwd_valid;
  cplx_t rx_payload_sample;
  logic signed [31:0] rx_h_re [M];
  logic signed [31:0] rx_h_im [M];
  logic signed [31:0] rx_fwd1_re, rx_fwd1_im, rx_fwd2_re, rx_fwd2_im;
  logic [$clog2(PAYLOAD)-1:0] rx_fwd_rd_addr = '0;
  logic signed [31:0] rx_fwd1_rd_re, rx_fwd1_rd_im, rx_fwd2_rd_re, rx_fwd2_rd_im;

  stbc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- CPU bus tasks --------------------------------------------------------
  initial begin tx_cpu_req = '0; rx_cpu_req = '0; end

  // requests are driven at the falling edge so that each lasts one clock
  task automatic tx_write(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk) tx_cpu_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    @(negedge clk) tx_cpu_req = '0;
  endtask
  task automatic rx_write(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk) rx_cpu_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    @(negedge clk) rx_cpu_req = '0;
  endtask
  task automatic tx_read(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk) tx_cpu_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    @(negedge clk) tx_cpu_req = '0;
    check(tx_cpu_rvalid, "tx rvalid");
    d = tx_cpu_rdata;
  endtask
  task automatic rx_read(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk) rx_cpu_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    @(negedge clk) rx_cpu_req = '0;
    check(rx_cpu_rvalid, "rx rvalid");
    d = rx_cpu_rdata;
  endtask

  // ---- reference data -------------------------------------------------------
  logic [31:0] sync_word = 32'hE4B1_7A2D;
  int sym_re [1024], sym_im [1024];       // pattern memory image
  int a_re [M][N], a_im [M][N];           // pinv(S) coefficients

  // expected transmit samples for one packet
  int e1_re [PKT], e1_im [PKT], e2_re [PKT], e2_im [PKT];

  // wrap to a 16-bit two's-complement value
  function automatic int sx16(int v);
    logic signed [15:0] t;
    t = v[15:0];
    return int'(t);
  endfunction

  function automatic int neg_sat(int v);
    return (v == -32768) ? 32767 : -v;
  endfunction

  task automatic build_expected();
    int n = 0;
    for (int s = 0; s < SYNC_LEN + TRAIN_SYMS + 2*DATA_SYMS; s++) begin
      int r1, i1, r2, i2;
      if (s < SYNC_LEN) begin
        r1 = sym_re[s]; i1 = sym_im[s]; r2 = 0; i2 = 0;
      end else if (s < SYNC_LEN + TRAIN_SYMS) begin
        int k = s - SYNC_LEN;
        r1 = sym_re[T1 + k]; i1 = sym_im[T1 + k]; r2 = sym_re[T2 + k]; i2 = sym_im[T2 + k];
      end else if (s < SYNC_LEN + TRAIN_SYMS + DATA_SYMS) begin
        int k = s - SYNC_LEN - TRAIN_SYMS;
        r1 = sym_re[D1 + k]; i1 = sym_im[D1 + k]; r2 = sym_re[D2 + k]; i2 = sym_im[D2 + k];
      end else begin
        int k = s - SYNC_LEN - TRAIN_SYMS - DATA_SYMS;
        // antenna 1: -conj(d2[L-1-k]); antenna 2: conj(d1[L-1-k])
        r1 = neg_sat(sym_re[D2 + DATA_SYMS-1-k]); i1 = sym_im[D2 + DATA_SYMS-1-k];
        r2 = sym_re[D1 + DATA_SYMS-1-k];          i2 = neg_sat(sym_im[D1 + DATA_SYMS-1-k]);
      end
      for (int p = 0; p < OSR; p++) begin
        e1_re[n] = r1; e1_im[n] = i1; e2_re[n] = r2; e2_im[n] = i2; n++;
      end
    end
  endtask

  // ---- channel model and transmit check --------------------------------------
  int tx_n = 0;             // sample index within the current packet
  int prev1_re = 0, prev1_im = 0;
  int rxs_re [$], rxs_im [$];   // received samples of the current packet
  int n_tx_conj = 0, n_tx_samples = 0;

  always @(posedge clk) begin
    rx_valid <= 1'b0;
    if (tx_valid) begin
      int r_re, r_im;
      check(tx_ant1.re == e1_re[tx_n] && tx_ant1.im == e1_im[tx_n] &&
            tx_ant2.re == e2_re[tx_n] && tx_ant2.im == e2_im[tx_n],
            $sformatf("tx sample %0d: %0d,%0d %0d,%0d exp %0d,%0d %0d,%0d", tx_n,
                      tx_ant1.re, tx_ant1.im, tx_ant2.re, tx_ant2.im,
                      e1_re[tx_n], e1_im[tx_n], e2_re[tx_n], e2_im[tx_n]));
      if (tx_n >= (SYNC_LEN + TRAIN_SYMS + DATA_SYMS) * OSR) n_tx_conj++;
      n_tx_samples++;
      r_re = int'(tx_ant1.re) + (prev1_re >>> 2) + (int'(tx_ant2.re) >>> 1);
      r_im = int'(tx_ant1.im) + (prev1_im >>> 2) + (int'(tx_ant2.im) >>> 1);
      prev1_re = tx_ant1.re; prev1_im = tx_ant1.im;
      rx_valid     <= 1'b1;
      rx_sample.re <= 16'(r_re);
      rx_sample.im <= 16'(r_im);
      rxs_re.push_back(sx16(r_re));
      rxs_im.push_back(sx16(r_im));
      tx_n = (tx_n == PKT - 1) ? 0 : tx_n + 1;
    end
  end

  // ---- receiver monitors ----------------------------------------------------
  int n_sync = 0, sync_at = -1, rx_n = 0, n_train = 0, first_train = -1;
  int n_payload = 0, n_frames = 0, n_est = 0, n_fwd = 0, n_fwd_checked = 0;
  int last_train_cycle = 0;
  int skip_left = 0, train_left = 0;   // training window as the bench expects it
  int exp_h_re [M], exp_h_im [M];
  int mf_re [PAYLOAD], mf_im [PAYLOAD];  // payload samples seen, for the filter check
  int fw1_re [PAYLOAD], fw1_im [PAYLOAD], fw2_re [PAYLOAD], fw2_im [PAYLOAD];  // expected FWD buffers

  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      if (skip_left > 0) begin
        skip_left--;
        if (skip_left == 0) train_left = N;
      end else if (train_left > 0) begin
        train_left--;
        if (n_train == 0) first_train = rx_n;
        n_train++;
        if (n_train % N == 0) last_train_cycle = cycle;
      end
      if (rx_sync_hit) begin n_sync++; sync_at = rx_n; skip_left = OSR - 1; end
      if (rx_payload_valid) begin
        mf_re[n_payload % PAYLOAD] = rx_payload_sample.re;
        mf_im[n_payload % PAYLOAD] = rx_payload_sample.im;
        n_payload++;
      end
      rx_n++;
    end
    if (rx_est_valid) begin
      n_est++;
      check(cycle - last_train_cycle == 3, $sformatf("estimate latency %0d", cycle - last_train_cycle));
      check(cycle - last_train_cycle <= OSR, "estimate within one symbol period");
      for (int i = 0; i < M; i++)
        check(rx_h_re[i] == exp_h_re[i] && rx_h_im[i] == exp_h_im[i],
              $sformatf("H[%0d] %0d,%0d exp %0d,%0d", i, rx_h_re[i], rx_h_im[i], exp_h_re[i], exp_h_im[i]));
    end
    if (rx_frame_done) n_frames++;
    if (rx_fwd_valid) begin
      // filter output k uses payload samples k-L+1..k (zeros before the first)
      automatic int k = n_fwd;
      automatic int f1r = 0, f1i = 0, f2r = 0, f2i = 0;
      for (int j = 0; j < L; j++) begin
        automatic int idx = k - L + 1 + j;
        automatic int xr = 0, xi = 0;
        automatic int h1r = sx16(exp_h_re[j]     >>> MF_SHIFT);
        automatic int h1i = sx16(exp_h_im[j]     >>> MF_SHIFT);
        automatic int h2r = sx16(exp_h_re[L + j] >>> MF_SHIFT);
        automatic int h2i = sx16(exp_h_im[L + j] >>> MF_SHIFT);
        if (idx >= 0) begin xr = mf_re[idx]; xi = mf_im[idx]; end
        f1r += h1r * xr + h1i * xi;  f1i += h1r * xi - h1i * xr;
        f2r += h2r * xr + h2i * xi;  f2i += h2r * xi - h2i * xr;
      end
      check(rx_fwd1_re == f1r && rx_fwd1_im == f1i && rx_fwd2_re == f2r && rx_fwd2_im == f2i,
            $sformatf("fwd %0d: %0d,%0d %0d,%0d exp %0d,%0d %0d,%0d", k,
                      rx_fwd1_re, rx_fwd1_im, rx_fwd2_re, rx_fwd2_im, f1r, f1i, f2r, f2i));
      if (k < PAYLOAD) begin
        fw1_re[k] = f1r; fw1_im[k] = f1i; fw2_re[k] = f2r; fw2_im[k] = f2i;
      end
      n_fwd++;
      n_fwd_checked++;
    end
  end

  // expected estimate from the training window of the received samples
  task automatic compute_expected_h(input int base);
    for (int i = 0; i < M; i++) begin
      exp_h_re[i] = 0; exp_h_im[i] = 0;
      for (int l = 0; l < N; l++) begin
        int xr = rxs_re[base + l], xi = rxs_im[base + l];
        exp_h_re[i] += a_re[i][l] * xr - a_im[i][l] * xi;
        exp_h_im[i] += a_re[i][l] * xi + a_im[i][l] * xr;
      end
    end
  endtask

  // ---- test sequence ----------------------------------------------------------
  int n_dbg_rx = 0, n_dbg_tx = 0, n_cpu_h = 0, n_fwd_cpu = 0, n_fwd_rev = 0;

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // pattern memory: sync word as +-8000 on I; training and data random QPSK-like
    for (int a = 0; a < 1024; a++) begin sym_re[a] = 0; sym_im[a] = 0; end
    for (int k = 0; k < SYNC_LEN; k++) begin
      sym_re[k] = sync_word[SYNC_LEN-1-k] ? 8000 : -8000; sym_im[k] = 0;
    end
    for (int a = T1; a < USED; a++) begin
      sym_re[a] = ($urandom & 1) ? 4000 : -4000;
      sym_im[a] = ($urandom & 1) ? 4000 : -4000;
    end
    sym_re[D1 + 2] = -32768;                  // exercises the saturating negation
    for (int a = 0; a < USED; a++)
      tx_write(20'h1_0000 | 20'(a), {16'(sym_re[a]), 16'(sym_im[a])});
    build_expected();

    // readback of a few pattern words through the CPU interface
    for (int a = 0; a < USED; a += 97) begin
      tx_read(20'h1_0000 | 20'(a), d);
      check(d == {16'(sym_re[a]), 16'(sym_im[a])}, $sformatf("tx ram readback %0d", a));
    end

    // pinv(S) coefficients, random 12-bit values
    for (int i = 0; i < M; i++)
      for (int l = 0; l < N; l++) begin
        a_re[i][l] = ($signed($urandom) >>> 20);
        a_im[i][l] = ($signed($urandom) >>> 20);
        rx_write(20'h1_0000 | 20'(i << 8) | 20'(l), {16'(a_re[i][l]), 16'(a_im[i][l])});
      end

    // receiver configuration
    rx_write(20'h0_0001, sync_word);
    rx_write(20'h0_0002, 32);              // all 32 symbols must agree
    rx_write(20'h0_0003, OSR - 1);         // rest of the last sync symbol
    rx_write(20'h0_0004, PAYLOAD);
    rx_write(20'h0_0005, 2);               // debug source: payload window
    rx_write(20'h0_0000, 32'h3);           // enable, debug waits for sync
    rx_write(20'h0_0006, 1);               // arm debug
    rx_read(20'h0_0008, d);
    check(d == 1, $sformatf("rx state searching %0d", d));

    tx_write(20'h0_0001, 32'h101);         // debug: antenna 2, wait for start
    tx_write(20'h0_0002, 1);               // arm

    for (int pkt = 0; pkt < 2; pkt++) begin
      automatic int base = rxs_re.size();
      tx_write(20'h0_0000, 1);             // start
      // wait for the training window to have been received, then predict H
      while (rxs_re.size() < base + SYNC_LEN*OSR + N) @(negedge clk);
      compute_expected_h(base + SYNC_LEN*OSR);
      while (n_frames < pkt + 1) @(negedge clk);
      repeat (5) @(posedge clk);
      check(sync_at - (rx_n - PKT) == (SYNC_LEN-1)*OSR, $sformatf("sync position %0d", sync_at - (rx_n - PKT)));
      check(first_train - (rx_n - PKT) == SYNC_LEN*OSR || pkt > 0, "training window start");
      check(n_train == N*(pkt+1), $sformatf("training samples %0d", n_train));
      check(n_payload == PAYLOAD*(pkt+1), $sformatf("payload samples %0d", n_payload));
      check(n_est == pkt + 1, "one estimate per packet");
      // CPU readback of the stored estimate
      for (int i = 0; i < M; i += 7) begin
        rx_read(20'h2_0000 | 20'(i << 1), d);
        check($signed(d) == exp_h_re[i], $sformatf("cpu H re %0d", i));
        rx_read(20'h2_0000 | 20'(i << 1) | 20'd1, d);
        check($signed(d) == exp_h_im[i], $sformatf("cpu H im %0d", i));
        n_cpu_h++;
      end
      // FWD 1 / FWD 2 frame buffers: fill level, CPU reads, reversed decoder reads
      rx_read(20'h0_000E, d);
      check(d == {16'(PAYLOAD), 16'(PAYLOAD)}, $sformatf("FWD buffer fill %h", d));
      for (int k = 0; k < PAYLOAD; k += 97) begin
        rx_read(20'h4_0000 | 20'(2*k), d);     check($signed(d) == fw1_re[k], $sformatf("cpu FWD1 re %0d", k));
        rx_read(20'h4_0000 | 20'(2*k + 1), d); check($signed(d) == fw1_im[k], $sformatf("cpu FWD1 im %0d", k));
        rx_read(20'h5_0000 | 20'(2*k), d);     check($signed(d) == fw2_re[k], $sformatf("cpu FWD2 re %0d", k));
        rx_read(20'h5_0000 | 20'(2*k + 1), d); check($signed(d) == fw2_im[k], $sformatf("cpu FWD2 im %0d", k));
        n_fwd_cpu++;
      end
      for (int k = PAYLOAD - 1; k >= 0; k--) begin
        @(negedge clk) rx_fwd_rd_addr = ($clog2(PAYLOAD))'(k);
        @(negedge clk);
        check(rx_fwd1_rd_re == fw1_re[k] && rx_fwd1_rd_im == fw1_im[k] &&
              rx_fwd2_rd_re == fw2_re[k] && rx_fwd2_rd_im == fw2_im[k], $sformatf("reversed FWD read %0d", k));
        n_fwd_rev++;
      end
      n_fwd = 0;                           // matched filters restart per payload
      for (int k = 0; k < PAYLOAD; k++) begin mf_re[k] = 0; mf_im[k] = 0; end
      n_payload = n_payload;               // (kept cumulative for the count check)
    end

    // status registers
    rx_read(20'h0_0009, d); check(d == 2, $sformatf("rx frames %0d", d));
    rx_read(20'h0_000A, d); check(d == 2, $sformatf("rx estimates %0d", d));
    tx_read(20'h0_0005, d); check(d == 2, $sformatf("tx packets %0d", d));

    // debug buffers: rx holds the first 1024 payload samples of packet 1
    rx_read(20'h0_000B, d);
    check(d[31] == 1'b1 && d[15:0] == 1024, $sformatf("rx debug status %h", d));
    for (int k = 0; k < 1024; k += 111) begin
      automatic int p = SYNC_LEN*OSR + N + k;
      rx_read(20'h3_0000 | 20'(k), d);
      check(d == {16'(rxs_re[p]), 16'(rxs_im[p])}, $sformatf("rx debug %0d", k));
      n_dbg_rx++;
    end
    tx_read(20'h0_0006, d);
    check(d[31] == 1'b1, $sformatf("tx debug status %h", d));
    for (int k = 0; k < 1024; k += 101) begin
      tx_read(20'h2_0000 | 20'(k), d);
      check(d == {16'(e2_re[k]), 16'(e2_im[k])}, $sformatf("tx debug %0d", k));
      n_dbg_tx++;
    end

    // every mechanism happened
    check(n_sync >= 2, "sync hits");
    check(n_tx_conj > 0, "time-reversed -conj blocks sent");
    check(n_est == 2, "channel estimates");
    check(n_fwd_checked > 0, "matched filter outputs");
    check(n_frames == 2, "frames completed");
    check(n_dbg_rx > 0 && n_dbg_tx > 0, "debug captures");
    check(n_cpu_h > 0, "estimate read back");
    check(n_fwd_cpu > 0 && n_fwd_rev > 0, "FWD buffers read by the CPU and in reverse");
    $display("mechanisms: sync=%0d tx_samples=%0d conj_samples=%0d estimates=%0d fwd=%0d frames=%0d dbg_rx=%0d dbg_tx=%0d fwd_cpu=%0d fwd_reversed=%0d",
             n_sync, n_tx_samples, n_tx_conj, n_est, n_fwd_checked, n_frames, n_dbg_rx, n_dbg_tx, n_fwd_cpu, n_fwd_rev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
