// stbc_rx: digital logic of the TR-STBC receiver.
//
// Takes the decimated complex receive stream (OSR samples per symbol) and:
//   - finds each frame's sync word (sync_detector);
//   - times the frame (rx_fsm): after a programmable offset, the next N
//     samples are the training window, then payload_len payload samples;
//   - estimates both channels by least squares from the training window
//     (channel_estimator, the serial-input matrix multiplier with pinv(S) in
//     its coefficient memories) and keeps the estimate;
//   - filters the payload with each channel's matched filter (time-reversed
//     conjugate of its estimate), giving the forward outputs FWD 1 and FWD 2;
//   - keeps each frame's forward outputs in the FWD 1 / FWD 2 buffers
//     (fwd_buffer), readable by the CPU and, forwards or backwards, by the
//     decoder through fwd_rd_addr;
//   - passes these, the raw payload and the estimate on to the remaining
//     TR-STBC decoding stages (linear combiner, Viterbi equalisers), which sit
//     outside this module;
//   - lets the CPU configure and observe everything through one memory
//     interface, including a debug buffer that records a chosen stream.
//
// CPU map (word addresses, region in bits 19:16):
//   0x0_0000 control/status (csr_bank, 8 control + 8 status registers)
//       ctrl 0: bit 0 enable, bit 1 debug waits for a sync hit
//       ctrl 1: sync word        ctrl 2: sync threshold (agreeing symbols)
//       ctrl 3: sync offset      ctrl 4: payload length (samples)
//       ctrl 5: debug source     ctrl 6: write = arm the debug buffer
//       stat 0: frame state  1: frames  2: estimates
//       stat 3: {done, capturing, 14'b0, count}  4: last sync match count
//       stat 5: live match count  6: samples in the FWD buffers  7: N
//   0x1_0000 pinv(S) coefficients, write only: offset = {row[7:0], col[7:0]},
//            data = {re[15:0], im[15:0]}
//   0x2_0000 channel estimate, read: offset = {tap, 0} real, {tap, 1} imaginary
//   0x3_0000 debug buffer, read: offset = sample index, data = {re, im}
//   0x4_0000 FWD 1 buffer, read: offset = {index, 0} real, {index, 1} imaginary
//   0x5_0000 FWD 2 buffer, same layout
// Debug sources: 0 receive input, 1 training window, 2 payload window.
//
// The stage order follows the document's receiver figure; the register map,
// the single clock and the N default are this design's choice.
module stbc_rx
  import stbc_pkg::*;
#(
  parameter int unsigned M         = 40,    // channel taps, both channels (document: 40)
  parameter int unsigned N         = 160,   // training samples per frame
  parameter int unsigned SYNC_LEN  = 32,
  parameter int unsigned DBG_DEPTH = 1024,
  parameter int unsigned MF_SHIFT  = 8,     // estimate bits dropped for the matched filters
  parameter int unsigned FWD_DEPTH = 2560   // forward-output samples kept per frame
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // CPU memory interface
  input  cpu_req_t                cpu_req,
  output logic [31:0]             cpu_rdata,
  output logic                    cpu_rvalid,
  // decimated receive samples
  input  logic                    rx_valid,
  input  cplx_t                   rx_sample,
  // to the TR-STBC decoder
  output logic                    sync_hit,
  output logic                    payload_valid,
  output cplx_t                   payload_sample,
  output logic                    est_valid,
  output logic signed [31:0]      h_re [M],
  output logic signed [31:0]      h_im [M],
  output logic                    frame_done,
  // forward matched-filter outputs FWD 1 / FWD 2, to the linear combiner
  output logic                    fwd_valid,
  output logic signed [31:0]      fwd1_re,
  output logic signed [31:0]      fwd1_im,
  output logic signed [31:0]      fwd2_re,
  output logic signed [31:0]      fwd2_im,
  // FWD 1 / FWD 2 buffers, read port for the linear combiner (1 clock latency)
  input  logic [$clog2(FWD_DEPTH)-1:0] fwd_rd_addr,
  output logic signed [31:0]      fwd1_rd_re,
  output logic signed [31:0]      fwd1_rd_im,
  output logic signed [31:0]      fwd2_rd_re,
  output logic signed [31:0]      fwd2_rd_im
);

  // ---- memory interface and registers -------------------------------------
  localparam int unsigned NREG = 6;
  logic [NREG-1:0] sel;
  logic [15:0]     offset;
  logic [31:0]     reg_rdata [NREG];

  mem_if_decode #(.NREG(NREG)) u_memif (
    .clk, .rst_n, .req(cpu_req), .rdata(cpu_rdata), .rvalid(cpu_rvalid),
    .sel, .offset, .reg_rdata
  );

  logic [31:0] ctrl   [8];
  logic [7:0]  ctrl_wr;
  logic [31:0] status [8];

  csr_bank #(.NCTRL(8), .NSTAT(8), .AW(8)) u_csr (
    .clk, .rst_n, .sel(sel[RX_REG_CSR]), .we(cpu_req.we), .re(cpu_req.re),
    .addr(offset[7:0]), .wdata(cpu_req.wdata), .rdata(reg_rdata[RX_REG_CSR]),
    .ctrl, .ctrl_wr, .status
  );

  // ---- synchroniser ---------------------------------------------------------
  localparam int unsigned CW = $clog2(SYNC_LEN+1);
  logic [CW-1:0] match_count, match_q;

  sync_detector #(.SYNC_LEN(SYNC_LEN), .OSR_P(OSR)) u_sync (
    .clk, .rst_n, .sample_valid(rx_valid), .sample(rx_sample),
    .sync_word(ctrl[1][SYNC_LEN-1:0]), .threshold(ctrl[2][CW-1:0]),
    .sync_hit, .match_count, .match_q
  );

  // ---- frame controller -----------------------------------------------------
  logic        searching, train_active, train_valid;
  logic [31:0] frame_count;
  logic [2:0]  state_code;

  rx_fsm #(.TRAIN_N(N), .LEN_W(16)) u_fsm (
    .clk, .rst_n, .enable(ctrl[0][0]), .sample_valid(rx_valid),
    .sync_hit(sync_hit && searching),
    .sync_offset(ctrl[3][15:0]), .payload_len(ctrl[4][15:0]),
    .searching, .train_active, .train_valid, .payload_valid,
    .frame_done, .frame_count, .state_code
  );

  assign payload_sample = payload_valid ? rx_sample : cplx_t'(0);   // zero outside the payload window

  // ---- channel estimator ----------------------------------------------------
  logic [31:0] est_count;

  channel_estimator #(.M(M), .N(N), .COEF_W(16), .ACC_W(32)) u_est (
    .clk, .rst_n,
    .coef_we  (sel[RX_REG_COEF] && cpu_req.we),
    .coef_row ($clog2(M)'(offset[15:8])),
    .coef_col ($clog2(N)'(offset[7:0])),
    .coef_re  (cpu_req.wdata[31:16]),
    .coef_im  (cpu_req.wdata[15:0]),
    .train_active, .train_valid, .train_sample(rx_sample),
    .est_valid, .est_count, .h_re, .h_im,
    .rd_en    (sel[RX_REG_CHAN] && cpu_req.re),
    .rd_addr  (offset[$clog2(M):0]),
    .rd_data  (reg_rdata[RX_REG_CHAN])
  );

  // ---- matched filters, one per transmit channel ---------------------------
  localparam int unsigned L = M / 2;
  logic signed [31:0] h1_re [L], h1_im [L], h2_re [L], h2_im [L];
  logic               fwd2_valid;

  always_comb
    for (int j = 0; j < L; j++) begin
      h1_re[j] = h_re[j];
      h1_im[j] = h_im[j];
      h2_re[j] = h_re[L + j];
      h2_im[j] = h_im[L + j];
    end

  // The estimate is stored 3 clocks after the last training sample, so the
  // payload is held back MF_DELAY clocks to be filtered with the new estimate.
  localparam int unsigned MF_DELAY = 4;
  logic  dly_valid [MF_DELAY+1];
  cplx_t dly_sample [MF_DELAY+1];
  assign dly_valid[0]  = payload_valid;
  assign dly_sample[0] = rx_sample;
  for (genvar d = 1; d <= MF_DELAY; d++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dly_valid[d]  <= 1'b0;
        dly_sample[d] <= '0;
      end else begin
        dly_valid[d]  <= dly_valid[d-1];
        dly_sample[d] <= dly_sample[d-1];
      end
    end
  end

  matched_filter #(.L(L), .H_W(32), .COEF_W(16), .H_SHIFT(MF_SHIFT), .OUT_W(32)) u_mf1 (
    .clk, .rst_n, .flush(train_active), .h_re(h1_re), .h_im(h1_im),
    .in_valid(dly_valid[MF_DELAY]), .in_sample(dly_sample[MF_DELAY]),
    .out_valid(fwd_valid), .out_re(fwd1_re), .out_im(fwd1_im)
  );

  matched_filter #(.L(L), .H_W(32), .COEF_W(16), .H_SHIFT(MF_SHIFT), .OUT_W(32)) u_mf2 (
    .clk, .rst_n, .flush(train_active), .h_re(h2_re), .h_im(h2_im),
    .in_valid(dly_valid[MF_DELAY]), .in_sample(dly_sample[MF_DELAY]),
    .out_valid(fwd2_valid), .out_re(fwd2_re), .out_im(fwd2_im)
  );

  // ---- FWD 1 / FWD 2 frame buffers ------------------------------------------
  localparam int unsigned FW = $clog2(FWD_DEPTH);
  logic [$clog2(FWD_DEPTH+1)-1:0] fwd1_count, fwd2_count;

  fwd_buffer #(.DEPTH(FWD_DEPTH), .W(32)) u_fwd1 (
    .clk, .rst_n, .clear(train_active),
    .in_valid(fwd_valid), .in_re(fwd1_re), .in_im(fwd1_im), .count(fwd1_count),
    .rd_en(sel[RX_REG_FWD1] && cpu_req.re), .rd_addr(offset[FW:0]),
    .rd_data(reg_rdata[RX_REG_FWD1]),
    .b_addr(fwd_rd_addr), .b_re(fwd1_rd_re), .b_im(fwd1_rd_im)
  );

  fwd_buffer #(.DEPTH(FWD_DEPTH), .W(32)) u_fwd2 (
    .clk, .rst_n, .clear(train_active),
    .in_valid(fwd2_valid), .in_re(fwd2_re), .in_im(fwd2_im), .count(fwd2_count),
    .rd_en(sel[RX_REG_FWD2] && cpu_req.re), .rd_addr(offset[FW:0]),
    .rd_data(reg_rdata[RX_REG_FWD2]),
    .b_addr(fwd_rd_addr), .b_re(fwd2_rd_re), .b_im(fwd2_rd_im)
  );

  // ---- debug multiplexer and buffer -----------------------------------------
  localparam int unsigned DW = $clog2(DBG_DEPTH);
  logic          dbg_capturing, dbg_done;
  logic [DW:0]   dbg_count;
  cplx_t         dbg_src [3];

  assign dbg_src[0] = rx_sample;
  assign dbg_src[1] = rx_sample;
  assign dbg_src[2] = rx_sample;

  debug_capture #(.NSRC(3), .DEPTH(DBG_DEPTH)) u_dbg (
    .clk, .rst_n,
    .src_valid({payload_valid, train_valid, rx_valid}),
    .src_data(dbg_src), .src_sel(ctrl[5][1:0]),
    .trig_mode(ctrl[0][1]), .trigger(sync_hit && searching),
    .arm(ctrl_wr[6]),
    .capturing(dbg_capturing), .done(dbg_done), .count(dbg_count),
    .rd_en(sel[RX_REG_DEBUG] && cpu_req.re), .rd_addr(offset[DW-1:0]),
    .rd_data(reg_rdata[RX_REG_DEBUG])
  );

  // ---- status ---------------------------------------------------------------
  assign status[0] = 32'(state_code);
  assign status[1] = frame_count;
  assign status[2] = est_count;
  assign status[3] = {dbg_done, dbg_capturing, 14'b0, 16'(dbg_count)};
  assign status[4] = 32'(match_q);
  assign status[5] = 32'(match_count);
  assign status[6] = {16'(fwd2_count), 16'(fwd1_count)};
  assign status[7] = 32'(N);

endmodule
