// matched_filter: channel matched filter of the TR-STBC decoder.
//
// Filters the received payload stream r with the time-reversed complex
// conjugate of one channel's estimated impulse response h[0..L-1]:
//
//   y[n] = sum_{j=0}^{L-1} conj(h[j]) * r[n-L+1+j]
//
// The L most recent samples sit in a delay line; every valid input sample
// produces one output, registered, one clock later (out_valid).  The channel
// taps come from the channel estimator at 32 bits; the filter uses bits
// [COEF_W-1+H_SHIFT : H_SHIFT] of each as its coefficient.  Products and sums
// wrap modulo 2^OUT_W.  The delay line starts at zero after reset and can be
// cleared with flush (at the start of each payload).
//
// The document names the matched filter and its forward outputs (FWD 1,
// FWD 2) in the receiver figure without describing it; the direct-form FIR,
// the coefficient scaling and the widths are this design's choice.
module matched_filter
  import stbc_pkg::*;
#(
  parameter int unsigned L       = 20,   // taps per channel (document: 40 taps for two channels)
  parameter int unsigned H_W     = 32,   // width of the estimated taps
  parameter int unsigned COEF_W  = 16,
  parameter int unsigned H_SHIFT = 8,
  parameter int unsigned OUT_W   = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  input  logic signed [H_W-1:0]   h_re [L],
  input  logic signed [H_W-1:0]   h_im [L],
  input  logic                    in_valid,
  input  cplx_t                   in_sample,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  cplx_t dline [L];          // dline[0] newest
  cplx_t win   [L];          // window including the incoming sample

  always_comb begin
    win[0] = in_sample;
    for (int k = 1; k < L; k++) win[k] = dline[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) dline[k] <= '0;
    end else if (flush) begin
      for (int k = 0; k < L; k++) dline[k] <= '0;
    end else if (in_valid) begin
      dline <= win;
    end
  end

  // y = sum_j conj(h[j]) * win[L-1-j]
  logic signed [OUT_W-1:0] acc_re, acc_im;
  always_comb begin
    logic signed [OUT_W-1:0] hr, hi, xr, xi;
    acc_re = '0;
    acc_im = '0;
    for (int j = 0; j < L; j++) begin
      hr = OUT_W'($signed(h_re[j][COEF_W-1+H_SHIFT -: COEF_W]));
      hi = OUT_W'($signed(h_im[j][COEF_W-1+H_SHIFT -: COEF_W]));
      xr = OUT_W'(win[L-1-j].re);
      xi = OUT_W'(win[L-1-j].im);
      // conj(h) * x = (hr - j hi)(xr + j xi)
      acc_re += hr * xr + hi * xi;
      acc_im += hr * xi - hi * xr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid && !flush;
      if (in_valid && !flush) begin
        out_re <= acc_re;
        out_im <= acc_im;
      end
    end
  end

endmodule
