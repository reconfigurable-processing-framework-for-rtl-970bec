// stbc_tx: digital logic of the two-antenna TR-STBC transmitter.
//
// The CPU loads the sync word, the two training sequences and the two data
// blocks into the pattern memory (tx_pattern_ram) and writes the start
// command.  The sequencer (tx_sequencer) then sends one packet on both
// antenna paths, one sample per tick: sync, training, data blocks and their
// time-reversed -conj()/conj() copies.  The antenna samples go on to the pulse
// shaping, IQ modulation and DAC stages, which sit outside this module.  A
// debug buffer can record either antenna's samples.
//
// CPU map (word addresses, region in bits 19:16):
//   0x0_0000 control/status (csr_bank, 4 control + 4 status registers)
//       ctrl 0: write with bit 0 set = start a packet
//       ctrl 1: debug source (bit 0), bit 8 = wait for the start command
//       ctrl 2: write = arm the debug buffer
//       stat 0: busy  1: packets sent  2: {done, capturing, 14'b0, count}
//   0x1_0000 pattern memory, read/write, data = {re[15:0], im[15:0]}:
//       packed in this order: sync word at 0, training 1 at SYNC_LEN,
//       training 2 at SYNC_LEN+TRAIN_SYMS, data block 1 at
//       SYNC_LEN+2*TRAIN_SYMS, data block 2 DATA_SYMS after it
//       (0, 32, 64, 96, 352 at the default sizes)
//   0x2_0000 debug buffer, read
//
// The document's transmitter figure gives the memory regions, the state
// machine, the sequence multiplexer and the debug buffer; the map and sizes
// are this design's choice.
module stbc_tx
  import stbc_pkg::*;
#(
  parameter int unsigned DEPTH      = 1024,
  parameter int unsigned SYNC_LEN   = 32,
  parameter int unsigned TRAIN_SYMS = 32,
  parameter int unsigned DATA_SYMS  = 256,
  parameter int unsigned DBG_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cpu_req_t    cpu_req,
  output logic [31:0] cpu_rdata,
  output logic        cpu_rvalid,
  input  logic        tick,
  output logic        tx_valid,
  output cplx_t       tx_ant1,
  output cplx_t       tx_ant2,
  output logic        tx_done
);

  localparam int unsigned NREG = 3;
  localparam int unsigned AW   = $clog2(DEPTH);
  logic [NREG-1:0] sel;
  logic [15:0]     offset;
  logic [31:0]     reg_rdata [NREG];

  mem_if_decode #(.NREG(NREG)) u_memif (
    .clk, .rst_n, .req(cpu_req), .rdata(cpu_rdata), .rvalid(cpu_rvalid),
    .sel, .offset, .reg_rdata
  );

  logic [31:0] ctrl   [4];
  logic [3:0]  ctrl_wr;
  logic [31:0] status [4];

  csr_bank #(.NCTRL(4), .NSTAT(4), .AW(8)) u_csr (
    .clk, .rst_n, .sel(sel[TX_REG_CSR]), .we(cpu_req.we), .re(cpu_req.re),
    .addr(offset[7:0]), .wdata(cpu_req.wdata), .rdata(reg_rdata[TX_REG_CSR]),
    .ctrl, .ctrl_wr, .status
  );

  logic [AW-1:0] a_addr, b_addr;
  cplx_t         a_data, b_data;

  tx_pattern_ram #(.DEPTH(DEPTH)) u_ram (
    .clk,
    .cpu_we(sel[TX_REG_RAM] && cpu_req.we), .cpu_re(sel[TX_REG_RAM] && cpu_req.re),
    .cpu_addr(offset[AW-1:0]), .cpu_wdata(cpu_req.wdata),
    .cpu_rdata(reg_rdata[TX_REG_RAM]),
    .a_addr, .a_data, .b_addr, .b_data
  );

  logic        start, busy;
  logic [31:0] packet_count;
  logic [1:0]  segment;

  assign start = ctrl_wr[0] && ctrl[0][0];

  tx_sequencer #(
    .DEPTH(DEPTH), .OSR_P(OSR), .SYNC_LEN(SYNC_LEN), .TRAIN_SYMS(TRAIN_SYMS),
    .DATA_SYMS(DATA_SYMS), .SYNC_BASE(0), .TRAIN1_BASE(SYNC_LEN),
    .TRAIN2_BASE(SYNC_LEN + TRAIN_SYMS), .DATA1_BASE(SYNC_LEN + 2*TRAIN_SYMS),
    .DATA2_BASE(SYNC_LEN + 2*TRAIN_SYMS + DATA_SYMS)
  ) u_seq (
    .clk, .rst_n, .start, .tick, .busy, .done(tx_done), .packet_count,
    .a_addr, .a_data, .b_addr, .b_data, .tx_valid, .tx_ant1, .tx_ant2, .segment
  );

  localparam int unsigned DW = $clog2(DBG_DEPTH);
  logic        dbg_capturing, dbg_done;
  logic [DW:0] dbg_count;
  cplx_t       dbg_src [2];

  assign dbg_src[0] = tx_ant1;
  assign dbg_src[1] = tx_ant2;

  debug_capture #(.NSRC(2), .DEPTH(DBG_DEPTH)) u_dbg (
    .clk, .rst_n,
    .src_valid({tx_valid, tx_valid}), .src_data(dbg_src), .src_sel(ctrl[1][0]),
    .trig_mode(ctrl[1][8]), .trigger(start), .arm(ctrl_wr[2]),
    .capturing(dbg_capturing), .done(dbg_done), .count(dbg_count),
    .rd_en(sel[TX_REG_DEBUG] && cpu_req.re), .rd_addr(offset[DW-1:0]),
    .rd_data(reg_rdata[TX_REG_DEBUG])
  );

  assign status[0] = 32'(busy);
  assign status[1] = packet_count;
  assign status[2] = {dbg_done, dbg_capturing, 14'b0, 16'(dbg_count)};
  assign status[3] = 32'(segment);

  initial assert (SYNC_LEN + 2*TRAIN_SYMS + 2*DATA_SYMS <= DEPTH)
    else $error("pattern memory too small for the packet");

endmodule
