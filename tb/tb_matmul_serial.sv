// tb_matmul_serial: self-checking test of the serial-input matrix multiplier.
// Loads a random complex matrix A through the coefficient port, streams random
// vectors x (back to back, with gaps, and after an aborted vector), and compares
// every y with A x computed here in 32-bit wrapping integer arithmetic.  Also
// checks that y_valid comes exactly 2 clocks after the last element, which is
// within one symbol period of 5 samples.
module tb_matmul_serial;
  localparam int M = 7;
  localparam int N = 11;
  localparam int LAT = 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;        // a falling edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  logic coef_we = 0;
  logic [$clog2(M)-1:0] coef_row = '0;
  logic [$clog2(N)-1:0] coef_col = '0;
  logic signed [15:0] coef_re = '0, coef_im = '0;
  logic restart = 0, x_valid = 0;
  logic signed [15:0] x_re = '0, x_im = '0;
  logic y_valid;
  logic signed [31:0] y_re [M];
  logic signed [31:0] y_im [M];
  logic [$clog2(N)-1:0] col_idx;

  matmul_serial #(.M(M), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  int a_re [M][N], a_im [M][N];
  int xv_re [N], xv_im [N];
  int exp_re [M], exp_im [M];
  int cycle = 0, last_cycle = 0, yv_cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected results, queued when a vector is sent and checked by the monitor
  int q_re [$];
  int q_im [$];
  int q_last [$];
  int n_results = 0;
  int last_accept = 0;

  task automatic send_vector(input int gap_pct);
    int e_re [M], e_im [M];
    for (int l = 0; l < N; l++) begin
      xv_re[l] = $signed($urandom) >>> 16;
      xv_im[l] = $signed($urandom) >>> 16;
    end
    for (int i = 0; i < M; i++) begin
      e_re[i] = 0; e_im[i] = 0;
      for (int l = 0; l < N; l++) begin
        e_re[i] += a_re[i][l]*xv_re[l] - a_im[i][l]*xv_im[l];
        e_im[i] += a_re[i][l]*xv_im[l] + a_im[i][l]*xv_re[l];
      end
    end
    for (int i = 0; i < M; i++) begin q_re.push_back(e_re[i]); q_im.push_back(e_im[i]); end
    for (int l = 0; l < N; l++) begin
      while (($urandom % 100) < gap_pct) begin
        x_valid <= 0; @(posedge clk);
      end
      x_valid <= 1; x_re <= 16'(xv_re[l]); x_im <= 16'(xv_im[l]);
      @(posedge clk);
    end
  endtask

  // monitor: sampled values at each rising edge
  always @(posedge clk) begin
    if (rst_n && x_valid && !restart && col_idx == $clog2(N)'(N-1)) last_accept = cycle;
    if (rst_n && y_valid) begin
      int e_re [M], e_im [M];
      check(q_re.size() > 0, "unexpected y_valid");
      if (q_re.size() > 0) begin
        for (int i = 0; i < M; i++) begin e_re[i] = q_re.pop_front(); e_im[i] = q_im.pop_front(); end
        check(cycle - last_accept == LAT, $sformatf("latency %0d", cycle - last_accept));
        for (int i = 0; i < M; i++)
          check(y_re[i] == e_re[i] && y_im[i] == e_im[i],
                $sformatf("r%0d y[%0d] got %0d,%0d exp %0d,%0d", n_results, i, y_re[i], y_im[i], e_re[i], e_im[i]));
        exp_re = e_re; exp_im = e_im;
        n_results++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // load A, mixing full-range and small values
    for (int i = 0; i < M; i++)
      for (int l = 0; l < N; l++) begin
        a_re[i][l] = $signed($urandom) >>> 16;
        a_im[i][l] = $signed($urandom) >>> 16;
        coef_we <= 1; coef_row <= i[$clog2(M)-1:0]; coef_col <= l[$clog2(N)-1:0];
        coef_re <= 16'(a_re[i][l]); coef_im <= 16'(a_im[i][l]);
        @(posedge clk);
      end
    coef_we <= 0;
    restart <= 1; @(posedge clk); restart <= 0;
    // back-to-back vectors: the next vector starts right after the last element
    for (int v = 0; v < 3; v++) send_vector(0);
    x_valid <= 0;
    repeat (4) @(posedge clk);
    // vectors with idle gaps
    for (int v = 0; v < 3; v++) send_vector(30);
    x_valid <= 0;
    repeat (4) @(posedge clk);
    // an aborted vector, then restart realigns the index counter
    for (int l = 0; l < 4; l++) begin x_valid <= 1; x_re <= 16'(l); @(posedge clk); end
    x_valid <= 0; restart <= 1; @(posedge clk); restart <= 0;
    send_vector(10);
    x_valid <= 0;
    repeat (4) @(posedge clk);
    check(n_results == 7 && q_re.size() == 0, $sformatf("results %0d", n_results));
    // y must hold its value while idle
    repeat (5) @(posedge clk);
    check(y_re[0] == exp_re[0] && y_im[M-1] == exp_im[M-1], "y held");
    check(!y_valid, "y_valid one pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
