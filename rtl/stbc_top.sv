// stbc_top: digital logic of a two-antenna time-reversal space-time block
// coded (TR-STBC) link: the transmitter and the receiver side by side.
//
// The transmitter (stbc_tx) sends packets of sync word, per-antenna training
// sequences and a TR-STBC coded payload on two antenna paths.  The receiver
// (stbc_rx) takes the single antenna's decimated samples, finds the sync word,
// estimates both channels by least squares with the serial-input matrix
// multiplier, and matched-filters the payload.  Each side has its own CPU
// memory interface.
//
// The two sides are separate units of the link; here they share one clock and
// reset.  The stages between them are analogue or not designed here (pulse
// shaping, IQ modulation, DAC and RF on the transmit side; RF, ADC,
// demodulation, pulse filter and decimation on the receive side), so the
// transmit samples leave through tx_* ports and the decimated receive samples
// enter through rx_*.  The linear combiner and the Viterbi equalisers that
// follow the matched filters are likewise outside, fed by the fwd*/payload
// and h_* ports and by the read port of the receiver's FWD 1 / FWD 2 frame
// buffers (rx_fwd_rd_addr in, rx_fwd*_rd_* one clock later), which hold one
// frame's payload, 2 x DATA_SYMS x 5 samples.
module stbc_top
  import stbc_pkg::*;
#(
  parameter int unsigned M          = 40,
  parameter int unsigned SYNC_LEN   = 32,
  parameter int unsigned TRAIN_SYMS = 32,
  parameter int unsigned DATA_SYMS  = 256,
  parameter int unsigned TX_DEPTH   = 1024,
  parameter int unsigned DBG_DEPTH  = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  // transmitter
  input  cpu_req_t           tx_cpu_req,
  output logic [31:0]        tx_cpu_rdata,
  output logic               tx_cpu_rvalid,
  input  logic               tx_tick,
  output logic               tx_valid,
  output cplx_t              tx_ant1,
  output cplx_t              tx_ant2,
  output logic               tx_done,
  // receiver
  input  cpu_req_t           rx_cpu_req,
  output logic [31:0]        rx_cpu_rdata,
  output logic               rx_cpu_rvalid,
  input  logic               rx_valid,
  input  cplx_t              rx_sample,
  output logic               rx_sync_hit,
  output logic               rx_payload_valid,
  output cplx_t              rx_payload_sample,
  output logic               rx_est_valid,
  output logic signed [31:0] rx_h_re [M],
  output logic signed [31:0] rx_h_im [M],
  output logic               rx_frame_done,
  output logic               rx_fwd_valid,
  output logic signed [31:0] rx_fwd1_re,
  output logic signed [31:0] rx_fwd1_im,
  output logic signed [31:0] rx_fwd2_re,
  output logic signed [31:0] rx_fwd2_im,
  input  logic [$clog2(2*DATA_SYMS*OSR)-1:0] rx_fwd_rd_addr,
  output logic signed [31:0] rx_fwd1_rd_re,
  output logic signed [31:0] rx_fwd1_rd_im,
  output logic signed [31:0] rx_fwd2_rd_re,
  output logic signed [31:0] rx_fwd2_rd_im
);

  // the receiver's training window is the transmitted training, oversampled
  localparam int unsigned N = TRAIN_SYMS * OSR;

  stbc_tx #(
    .DEPTH(TX_DEPTH), .SYNC_LEN(SYNC_LEN), .TRAIN_SYMS(TRAIN_SYMS),
    .DATA_SYMS(DATA_SYMS), .DBG_DEPTH(DBG_DEPTH)
  ) u_tx (
    .clk, .rst_n, .cpu_req(tx_cpu_req), .cpu_rdata(tx_cpu_rdata),
    .cpu_rvalid(tx_cpu_rvalid), .tick(tx_tick), .tx_valid, .tx_ant1, .tx_ant2,
    .tx_done
  );

  stbc_rx #(
    .M(M), .N(N), .SYNC_LEN(SYNC_LEN), .DBG_DEPTH(DBG_DEPTH),
    .FWD_DEPTH(2 * DATA_SYMS * OSR)
  ) u_rx (
    .clk, .rst_n, .cpu_req(rx_cpu_req), .cpu_rdata(rx_cpu_rdata),
    .cpu_rvalid(rx_cpu_rvalid), .rx_valid, .rx_sample,
    .sync_hit(rx_sync_hit), .payload_valid(rx_payload_valid),
    .payload_sample(rx_payload_sample), .est_valid(rx_est_valid),
    .h_re(rx_h_re), .h_im(rx_h_im), .frame_done(rx_frame_done),
    .fwd_valid(rx_fwd_valid), .fwd1_re(rx_fwd1_re), .fwd1_im(rx_fwd1_im),
    .fwd2_re(rx_fwd2_re), .fwd2_im(rx_fwd2_im),
    .fwd_rd_addr(rx_fwd_rd_addr),
    .fwd1_rd_re(rx_fwd1_rd_re), .fwd1_rd_im(rx_fwd1_rd_im),
    .fwd2_rd_re(rx_fwd2_rd_re), .fwd2_rd_im(rx_fwd2_rd_im)
  );

endmodule
