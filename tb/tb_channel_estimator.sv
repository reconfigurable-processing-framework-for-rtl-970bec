// tb_channel_estimator: least-squares estimator with a small random pinv(S).
// Streams training windows (with gaps, and one aborted window), checks the
// stored estimate against pinv(S) times the window computed here, the 3-clock
// latency, the estimate counter, that the store holds between estimates, and
// the CPU read port.
module tb_channel_estimator;
  import stbc_pkg::*;
  localparam int M = 6, N = 9;

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

  channel_estimator #(.M(M), .N(N)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a_re [M][N], a_im [M][N], e_re [M], e_im [M];
  int last_cycle = 0, n_est = 0;

  always @(posedge clk) if (rst_n && train_active && train_valid) last_cycle = cycle;
  always @(posedge clk) if (rst_n && est_valid) begin
    n_est++;
    check(cycle - last_cycle == 3, $sformatf("latency %0d", cycle - last_cycle));
    for (int i = 0; i < M; i++)
      check(h_re[i] == e_re[i] && h_im[i] == e_im[i], $sformatf("h[%0d] %0d,%0d exp %0d,%0d", i, h_re[i], h_im[i], e_re[i], e_im[i]));
  end

  task automatic window(input int gap_pct, input int stop_after);
    int xr [N], xi [N];
    for (int l = 0; l < N; l++) begin xr[l] = $signed($urandom) >>> 16; xi[l] = $signed($urandom) >>> 16; end
    if (stop_after >= N)
      for (int i = 0; i < M; i++) begin
        e_re[i] = 0; e_im[i] = 0;
        for (int l = 0; l < N; l++) begin
          e_re[i] += a_re[i][l]*xr[l] - a_im[i][l]*xi[l];
          e_im[i] += a_re[i][l]*xi[l] + a_im[i][l]*xr[l];
        end
      end
    @(negedge clk) train_active = 1;
    for (int l = 0; l < N && l < stop_after; l++) begin
      while (($urandom % 100) < gap_pct) begin train_valid = 0; @(negedge clk); end
      train_valid = 1; train_sample.re = 16'(xr[l]); train_sample.im = 16'(xi[l]);
      @(negedge clk);
    end
    train_valid = 0; train_active = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    logic signed [31:0] keep;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < M; i++)
      for (int l = 0; l < N; l++) begin
        a_re[i][l] = $signed($urandom) >>> 16; a_im[i][l] = $signed($urandom) >>> 16;
        @(negedge clk);
        coef_we = 1; coef_row = i[$clog2(M)-1:0]; coef_col = l[$clog2(N)-1:0];
        coef_re = 16'(a_re[i][l]); coef_im = 16'(a_im[i][l]);
      end
    @(negedge clk) coef_we = 0;
    window(0, N);
    check(n_est == 1 && est_count == 1, "first estimate");
    keep = h_re[M-1];
    window(0, 4);                      // aborted: no estimate, store unchanged
    check(n_est == 1 && h_re[M-1] == keep, "aborted window leaves the store");
    window(40, N);
    window(0, N);
    check(n_est == 3 && est_count == 3, $sformatf("estimates %0d", n_est));
    for (int i = 0; i < M; i++)
      for (int c = 0; c < 2; c++) begin
        @(negedge clk) rd_en = 1; rd_addr = ($clog2(M)+1)'(2*i + c);
        @(negedge clk) rd_en = 0;
        check($signed(rd_data) == (c ? e_im[i] : e_re[i]), $sformatf("cpu read %0d.%0d", i, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
