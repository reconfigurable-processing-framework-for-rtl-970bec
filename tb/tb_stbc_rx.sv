// tb_stbc_rx: receiver with small sizes (4 taps, 10 training samples, 8-symbol
// sync word).  The bench builds frames of noise, sync word, training and
// payload, loads a random pinv(S) through the CPU interface, and checks the
// estimate (ports and CPU readback), the frame and estimate counters, the
// payload window, both matched-filter outputs, the FWD 1 / FWD 2 frame
// buffers (CPU reads and reversed decoder reads) and the debug buffer.
module tb_stbc_rx;
  import stbc_pkg::*;
  localparam int M = 4, N = 10, SL = 8, DBG = 16, P = 12, L = M/2, SH = 8, FD = 16;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  cpu_req_t cpu_req = '0;
  logic [31:0] cpu_rdata;
  logic cpu_rvalid;
  logic rx_valid = 0;
  cplx_t rx_sample = '0;
  logic sync_hit, payload_valid, est_valid, frame_done, fwd_valid;
  cplx_t payload_sample;
  logic signed [31:0] h_re [M];
  logic signed [31:0] h_im [M];
  logic signed [31:0] fwd1_re, fwd1_im, fwd2_re, fwd2_im;
  logic [$clog2(FD)-1:0] fwd_rd_addr = '0;
  logic signed [31:0] fwd1_rd_re, fwd1_rd_im, fwd2_rd_re, fwd2_rd_im;

  stbc_rx #(.M(M), .N(N), .SYNC_LEN(SL), .DBG_DEPTH(DBG), .MF_SHIFT(SH), .FWD_DEPTH(FD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk) cpu_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    @(negedge clk) cpu_req = '0;
  endtask
  task automatic rd(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk) cpu_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    @(negedge clk) cpu_req = '0;
    check(cpu_rvalid, "rvalid");
    d = cpu_rdata;
  endtask
  function automatic int sx16(int v);
    logic signed [15:0] t;
    t = v[15:0];
    return int'(t);
  endfunction

  logic [SL-1:0] sw = 8'b1100_1010;
  int a_re [M][N], a_im [M][N];
  int tr [N], ti [N], pr [P], pi [P];
  int e_re [M], e_im [M];
  int w1r [P], w1i [P], w2r [P], w2i [P];   // expected FWD buffer contents
  int n_est = 0, n_pay = 0, n_fwd = 0, n_frames = 0;

  always @(posedge clk) if (rst_n) begin
    if (est_valid) begin
      n_est++;
      for (int i = 0; i < M; i++) check(h_re[i] == e_re[i] && h_im[i] == e_im[i], $sformatf("h[%0d]", i));
    end
    if (payload_valid) begin
      check(payload_sample.re == pr[n_pay % P] && payload_sample.im == pi[n_pay % P], "payload sample");
      n_pay++;
    end
    if (fwd_valid) begin
      automatic int k = n_fwd % P;
      automatic int f1r = 0, f1i = 0, f2r = 0, f2i = 0;
      for (int j = 0; j < L; j++) begin
        automatic int x = k - L + 1 + j;
        automatic int xr = (x >= 0) ? pr[x] : 0, xi = (x >= 0) ? pi[x] : 0;
        automatic int h1r = sx16(e_re[j] >>> SH), h1i = sx16(e_im[j] >>> SH);
        automatic int h2r = sx16(e_re[L+j] >>> SH), h2i = sx16(e_im[L+j] >>> SH);
        f1r += h1r*xr + h1i*xi; f1i += h1r*xi - h1i*xr;
        f2r += h2r*xr + h2i*xi; f2i += h2r*xi - h2i*xr;
      end
      check(fwd1_re == f1r && fwd1_im == f1i && fwd2_re == f2r && fwd2_im == f2i, $sformatf("fwd %0d", k));
      w1r[k] = f1r; w1i[k] = f1i; w2r[k] = f2r; w2i[k] = f2i;
      n_fwd++;
    end
    if (frame_done) n_frames++;
  end

  task automatic put(input int r, input int i);
    @(negedge clk) rx_valid = 1; rx_sample.re = 16'(r); rx_sample.im = 16'(i);
    @(negedge clk) rx_valid = 0;
  endtask

  task automatic frame();
    for (int l = 0; l < N; l++) begin tr[l] = $signed($urandom) >>> 18; ti[l] = $signed($urandom) >>> 18; end
    for (int k = 0; k < P; k++) begin pr[k] = $signed($urandom) >>> 18; pi[k] = $signed($urandom) >>> 18; end
    for (int i = 0; i < M; i++) begin
      e_re[i] = 0; e_im[i] = 0;
      for (int l = 0; l < N; l++) begin
        e_re[i] += a_re[i][l]*tr[l] - a_im[i][l]*ti[l];
        e_im[i] += a_re[i][l]*ti[l] + a_im[i][l]*tr[l];
      end
    end
    for (int k = 0; k < 30; k++) put((k % 4 < 2) ? 500 : -500, 0);   // idle pattern
    for (int s = SL-1; s >= 0; s--) for (int p = 0; p < OSR; p++) put(sw[s] ? 3000 : -3000, 7);
    for (int l = 0; l < N; l++) put(tr[l], ti[l]);
    for (int k = 0; k < P; k++) put(pr[k], pi[k]);
    for (int k = 0; k < 8; k++) put(-500, 0);
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < M; i++)
      for (int l = 0; l < N; l++) begin
        a_re[i][l] = $signed($urandom) >>> 18; a_im[i][l] = $signed($urandom) >>> 18;
        wr(20'h1_0000 | 20'(i << 8) | 20'(l), {16'(a_re[i][l]), 16'(a_im[i][l])});
      end
    wr(20'h0_0001, 32'(sw));
    wr(20'h0_0002, SL);
    wr(20'h0_0003, OSR - 1);
    wr(20'h0_0004, P);
    wr(20'h0_0005, 2);                       // debug: payload
    wr(20'h0_0000, 3);                       // enable, debug waits for sync
    wr(20'h0_0006, 1);                       // arm
    for (int f = 0; f < 2; f++) begin
      n_fwd = 0;
      frame();
      check(n_frames == f + 1 && n_est == f + 1, $sformatf("frame %0d: frames %0d estimates %0d", f, n_frames, n_est));
      check(n_pay == P*(f+1) && n_fwd == P, $sformatf("payload %0d fwd %0d", n_pay, n_fwd));
      for (int i = 0; i < M; i++) begin
        rd(20'h2_0000 | 20'(2*i), d);     check($signed(d) == e_re[i], "cpu h re");
        rd(20'h2_0000 | 20'(2*i + 1), d); check($signed(d) == e_im[i], "cpu h im");
      end
      repeat (4) @(negedge clk);
      rd(20'h0_000E, d); check(d == {16'(P), 16'(P)}, $sformatf("FWD fill %h", d));
      for (int k = 0; k < P; k++) begin
        rd(20'h4_0000 | 20'(2*k), d);     check($signed(d) == w1r[k], $sformatf("cpu FWD1 re %0d", k));
        rd(20'h4_0000 | 20'(2*k + 1), d); check($signed(d) == w1i[k], $sformatf("cpu FWD1 im %0d", k));
        rd(20'h5_0000 | 20'(2*k), d);     check($signed(d) == w2r[k], $sformatf("cpu FWD2 re %0d", k));
        rd(20'h5_0000 | 20'(2*k + 1), d); check($signed(d) == w2i[k], $sformatf("cpu FWD2 im %0d", k));
      end
      for (int k = P - 1; k >= 0; k--) begin
        @(negedge clk) fwd_rd_addr = ($clog2(FD))'(k);
        @(negedge clk);
        check(fwd1_rd_re == w1r[k] && fwd1_rd_im == w1i[k] && fwd2_rd_re == w2r[k] && fwd2_rd_im == w2i[k],
              $sformatf("reversed FWD read %0d", k));
      end
      if (f == 0) begin
        rd(20'h0_000B, d); check(d[15:0] == P && !d[31], $sformatf("debug status %h", d));
        for (int k = 0; k < P; k++) begin
          rd(20'h3_0000 | 20'(k), d); check(d == {16'(pr[k]), 16'(pi[k])}, $sformatf("debug %0d", k));
        end
      end
    end
    rd(20'h0_0009, d); check(d == 2, "frame counter");
    rd(20'h0_000A, d); check(d == 2, "estimate counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
