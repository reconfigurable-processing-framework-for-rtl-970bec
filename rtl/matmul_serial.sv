// matmul_serial: serial-input matrix multiplier, y = A x, with parallel output.
//
// The product is built column by column, y = A(:,1) x1 + A(:,2) x2 + ... +
// A(:,n) xn, so every element x_l is used the clock it arrives and no input
// buffer is needed.  There is one lane per output element y_i.  A lane holds
// row i of A in its own coefficient memory (N words, addressed by the index of
// the current input element), one complex multiplier, one adder and the y_i
// accumulator register.  This is the document's "optimised" structure (m
// multipliers, m adders, m registers); the lane count M = 40 and the 32-bit
// accumulators are the document's channel-estimator numbers.
//
// Interface
//   coef_we/row/col/re/im  write A(row,col); loaded by the CPU before use.
//   restart                the next accepted element is x1 (index counter to 0).
//   x_valid, x_re, x_im    one complex input element per clock when valid.
//   y_valid                one-clock pulse: y_re/y_im hold A x for the vector
//                          whose last element was accepted two clocks earlier.
//   y_re/y_im              accumulator outputs; they stay valid until the
//                          first element of the next vector is accumulated.
//
// Timing: two-stage pipeline.  Stage 1 reads A(:,l) from the coefficient
// memories and registers x_l; stage 2 multiplies and accumulates.  The first
// element of a vector loads the accumulator instead of adding to it.  Latency
// from the last element to y_valid is 2 clocks, inside the document's bound of
// one symbol period (5 samples).  A new vector may follow back to back.
//
// Own choices: complex arithmetic (the channel estimate is complex), the
// pipeline split, the coefficient write port, and accumulation modulo
// 2^ACC_W; the coefficient scaling must keep the sums in range.
module matmul_serial #(
  parameter int unsigned M      = 40,   // rows of A, outputs (document: 40 taps)
  parameter int unsigned N      = 160,  // columns of A, input elements per vector
  parameter int unsigned DATA_W = 16,   // bits per component of x
  parameter int unsigned COEF_W = 16,   // bits per component of A
  parameter int unsigned ACC_W  = 32    // bits per component of y (document: 32)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // coefficient load port
  input  logic                          coef_we,
  input  logic [$clog2(M)-1:0]          coef_row,
  input  logic [$clog2(N)-1:0]          coef_col,
  input  logic signed [COEF_W-1:0]      coef_re,
  input  logic signed [COEF_W-1:0]      coef_im,
  // input vector stream
  input  logic                          restart,
  input  logic                          x_valid,
  input  logic signed [DATA_W-1:0]      x_re,
  input  logic signed [DATA_W-1:0]      x_im,
  // parallel result
  output logic                          y_valid,
  output logic signed [ACC_W-1:0]       y_re [M],
  output logic signed [ACC_W-1:0]       y_im [M],
  output logic [$clog2(N)-1:0]          col_idx
);

  localparam int unsigned CW = $clog2(N);

  // ---- stage 0: column index of the element being accepted -------------
  logic [CW-1:0] col;
  assign col_idx = col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                col <= '0;
    else if (restart)          col <= '0;
    else if (x_valid)          col <= (col == CW'(N-1)) ? '0 : col + 1'b1;
  end

  // ---- stage 1: coefficient read, input register -------------------------
  logic                     s1_valid, s1_first, s1_last;
  logic signed [DATA_W-1:0] s1_x_re, s1_x_im;
  logic signed [COEF_W-1:0] s1_a_re [M];
  logic signed [COEF_W-1:0] s1_a_im [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_x_re  <= '0;
      s1_x_im  <= '0;
    end else begin
      s1_valid <= x_valid && !restart;
      s1_first <= (col == '0);
      s1_last  <= (col == CW'(N-1));
      if (x_valid) begin
        s1_x_re <= x_re;
        s1_x_im <= x_im;
      end
    end
  end

  // ---- lanes: coefficient memory, complex MAC, accumulator ---------------
  for (genvar i = 0; i < M; i++) begin : g_lane
    logic [2*COEF_W-1:0] coef_mem [N];

    always_ff @(posedge clk) begin
      if (coef_we && coef_row == $clog2(M)'(i))
        coef_mem[coef_col] <= {coef_re, coef_im};
      s1_a_re[i] <= coef_mem[col][2*COEF_W-1:COEF_W];
      s1_a_im[i] <= coef_mem[col][COEF_W-1:0];
    end

    // operands sign-extended to the accumulator width, products modulo 2^ACC_W
    logic signed [ACC_W-1:0] ar, ai, xr, xi, p_re, p_im;
    always_comb begin
      ar   = ACC_W'(s1_a_re[i]);
      ai   = ACC_W'(s1_a_im[i]);
      xr   = ACC_W'(s1_x_re);
      xi   = ACC_W'(s1_x_im);
      p_re = ar * xr - ai * xi;
      p_im = ar * xi + ai * xr;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        y_re[i] <= '0;
        y_im[i] <= '0;
      end else if (s1_valid) begin
        y_re[i] <= (s1_first ? ACC_W'(0) : y_re[i]) + p_re;
        y_im[i] <= (s1_first ? ACC_W'(0) : y_im[i]) + p_im;
      end
    end
  end

  // ---- result strobe ------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= s1_valid && s1_last;
  end

endmodule
