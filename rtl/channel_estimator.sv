// channel_estimator: least-squares channel estimator, H = pinv(S) Y.
//
// The received training samples Y are streamed, one per clock when valid, into
// a serial-input matrix multiplier (matmul_serial) whose coefficient memories
// hold the precomputed pseudo-inverse pinv(S) = (S^H S)^-1 S^H of the training
// sequence's convolution matrix.  Because pinv(S) is just a table, a new
// training sequence only needs new coefficients, written through the coef_*
// port by the CPU.  When the last training sample has been accumulated the M
// taps are copied into the channel store: taps 0..M/2-1 are the estimate of
// channel 1, taps M/2..M-1 of channel 2.  The store keeps the estimate until
// the next one completes and can be read by the CPU and by later stages.
//
// Interface
//   train_active   high while the frame controller is in its training window;
//                  low realigns the multiplier to the first column.
//   train_valid    a training sample on train_sample (only while active).
//   coef_*         write pinv(S)(row, col).
//   est_valid      one-clock pulse when a new estimate enters the store.
//   h_re/h_im      the stored estimate, ACC_W bits per component.
//   rd_en/rd_addr  CPU read of the store: rd_addr = {tap, 1'b0} real part,
//                  {tap, 1'b1} imaginary part; rd_data one clock later.
//
// Timing: est_valid rises 3 clocks after the last training sample is taken
// (2 in the multiplier, 1 into the store), well inside one symbol period.
// The document gives M = 40 taps of 32 bits; the training length N, the
// 16-bit sample and coefficient widths and the split of the taps into two
// halves (as the figure of the receiver and eq. (4) stack H1 over H2) are
// read from it or chosen here as stated in the parameters.
module channel_estimator
  import stbc_pkg::*;
#(
  parameter int unsigned M      = 40,   // taps, both channels together (document: 40)
  parameter int unsigned N      = 160,  // training samples per estimate
  parameter int unsigned COEF_W = 16,
  parameter int unsigned ACC_W  = 32    // document: 32-bit taps
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_we,
  input  logic [$clog2(M)-1:0]      coef_row,
  input  logic [$clog2(N)-1:0]      coef_col,
  input  logic signed [COEF_W-1:0]  coef_re,
  input  logic signed [COEF_W-1:0]  coef_im,
  input  logic                      train_active,
  input  logic                      train_valid,
  input  cplx_t                     train_sample,
  output logic                      est_valid,
  output logic [31:0]               est_count,
  output logic signed [ACC_W-1:0]   h_re [M],
  output logic signed [ACC_W-1:0]   h_im [M],
  input  logic                      rd_en,
  input  logic [$clog2(M):0]        rd_addr,
  output logic [31:0]               rd_data
);

  logic                    y_valid;
  logic signed [ACC_W-1:0] y_re [M];
  logic signed [ACC_W-1:0] y_im [M];
  logic [$clog2(N)-1:0]    col_idx;

  matmul_serial #(.M(M), .N(N), .DATA_W(SAMPLE_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_mm (
    .clk, .rst_n,
    .coef_we, .coef_row, .coef_col, .coef_re, .coef_im,
    .restart (!train_active),
    .x_valid (train_valid && train_active),
    .x_re    (train_sample.re),
    .x_im    (train_sample.im),
    .y_valid, .y_re, .y_im, .col_idx
  );

  // channel store (Channel 1 = taps 0..M/2-1, Channel 2 = taps M/2..M-1)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid <= 1'b0;
      est_count <= '0;
      for (int i = 0; i < M; i++) begin
        h_re[i] <= '0;
        h_im[i] <= '0;
      end
    end else begin
      est_valid <= y_valid;
      if (y_valid) begin
        est_count <= est_count + 1;
        h_re <= y_re;
        h_im <= y_im;
      end
    end
  end

  // CPU read port
  logic [$clog2(M)-1:0] rd_tap;
  assign rd_tap = rd_addr[$clog2(M):1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    rd_data <= '0;
    else if (rd_en) begin
      if (32'(rd_tap) >= M)        rd_data <= '0;
      else if (rd_addr[0])         rd_data <= 32'(h_im[rd_tap]);
      else                         rd_data <= 32'(h_re[rd_tap]);
    end
  end


endmodule
