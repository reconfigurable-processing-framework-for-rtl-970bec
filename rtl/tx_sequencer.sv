// tx_sequencer: transmit state machine and sequence multiplexer.
//
// A start command sends one packet on both antennas, one complex sample per
// tick (the sample-rate enable), every symbol held for OSR ticks:
//
//   SYNC   SYNC_LEN symbols   antenna 1: sync word        antenna 2: silent
//   TRAIN  TRAIN_SYMS         antenna 1: training seq. 1  antenna 2: training seq. 2
//   BLK1   DATA_SYMS          antenna 1: d1[k]            antenna 2: d2[k]
//   BLK2   DATA_SYMS          antenna 1: -conj(d2[L-1-k]) antenna 2: conj(d1[L-1-k])
//
// BLK1/BLK2 is the time-reversal space-time block code: the second block of
// each antenna is the other antenna's first block, time reversed and
// conjugated, negated on antenna 1.  The symbols are read from tx_pattern_ram
// at the base addresses given as parameters.
//
// Timing: the RAM read ports are addressed from the current position, and the
// RAM output, transformed, is the output sample: tx_valid and tx_ant1/2 change
// on the clock edge after a tick, one sample per tick.  done pulses with the
// last sample.  A start while busy is ignored.
//
// The document gives the memory, the state machine that switches the sequences
// into the transmit path by the packet structure, and the -conj() block; the
// packet order, the lengths and the holding of each symbol for OSR samples
// (standing in for the pulse shaper, which the document does not describe)
// are this design's choice.
module tx_sequencer
  import stbc_pkg::*;
#(
  parameter int unsigned DEPTH       = 1024,
  parameter int unsigned OSR_P       = 5,     // document: five-fold oversampling
  parameter int unsigned SYNC_LEN    = 32,
  parameter int unsigned TRAIN_SYMS  = 32,
  parameter int unsigned DATA_SYMS   = 256,
  parameter int unsigned SYNC_BASE   = 0,
  parameter int unsigned TRAIN1_BASE = 32,
  parameter int unsigned TRAIN2_BASE = 64,
  parameter int unsigned DATA1_BASE  = 128,
  parameter int unsigned DATA2_BASE  = 384
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     tick,
  output logic                     busy,
  output logic                     done,
  output logic [31:0]              packet_count,
  output logic [$clog2(DEPTH)-1:0] a_addr,
  input  cplx_t                    a_data,
  output logic [$clog2(DEPTH)-1:0] b_addr,
  input  cplx_t                    b_data,
  output logic                     tx_valid,
  output cplx_t                    tx_ant1,
  output cplx_t                    tx_ant2,
  output logic [1:0]               segment
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {SEG_SYNC, SEG_TRAIN, SEG_BLK1, SEG_BLK2} seg_t;

  seg_t        seg, seg_q;
  logic [15:0] idx;
  logic [$clog2(OSR_P+1)-1:0] phase;
  logic        last_q;

  function automatic logic [15:0] seg_len(seg_t s);
    unique case (s)
      SEG_SYNC:  return 16'(SYNC_LEN);
      SEG_TRAIN: return 16'(TRAIN_SYMS);
      default:   return 16'(DATA_SYMS);
    endcase
  endfunction

  // read addresses of the current symbol
  always_comb begin
    unique case (seg)
      SEG_SYNC:  begin a_addr = AW'(SYNC_BASE + idx);   b_addr = AW'(SYNC_BASE + idx);   end
      SEG_TRAIN: begin a_addr = AW'(TRAIN1_BASE + idx); b_addr = AW'(TRAIN2_BASE + idx); end
      SEG_BLK1:  begin a_addr = AW'(DATA1_BASE + idx);  b_addr = AW'(DATA2_BASE + idx);  end
      default:   begin a_addr = AW'(DATA2_BASE + DATA_SYMS - 1 - idx);
                       b_addr = AW'(DATA1_BASE + DATA_SYMS - 1 - idx); end
    endcase
  end

  logic sym_end, pkt_end;
  assign sym_end = (32'(phase) == OSR_P - 1);
  assign pkt_end = sym_end && (seg == SEG_BLK2) && (idx == seg_len(SEG_BLK2) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      seg          <= SEG_SYNC;
      seg_q        <= SEG_SYNC;
      idx          <= '0;
      phase        <= '0;
      tx_valid     <= 1'b0;
      last_q       <= 1'b0;
      packet_count <= '0;
    end else begin
      tx_valid <= busy && tick;
      last_q   <= busy && tick && pkt_end;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          seg   <= SEG_SYNC;
          idx   <= '0;
          phase <= '0;
        end
      end else if (tick) begin
        seg_q <= seg;
        if (!sym_end) phase <= phase + 1'b1;
        else begin
          phase <= '0;
          if (idx == seg_len(seg) - 1) begin
            idx <= '0;
            if (seg == SEG_BLK2) begin
              busy         <= 1'b0;
              packet_count <= packet_count + 1;
            end else seg <= seg_t'(seg + 2'd1);
          end else idx <= idx + 1'b1;
        end
      end
    end
  end

  assign done    = last_q;
  assign segment = seg_q;

  cplx_t a_nc, b_c;
  neg_conj u_nc_a (.a(a_data), .negate(1'b1), .y(a_nc));
  neg_conj u_c_b  (.a(b_data), .negate(1'b0), .y(b_c));

  always_comb begin
    tx_ant1 = '0;
    tx_ant2 = '0;
    if (tx_valid) begin
      unique case (seg_q)
        SEG_SYNC:  begin tx_ant1 = a_data; tx_ant2 = '0;     end
        SEG_TRAIN,
        SEG_BLK1:  begin tx_ant1 = a_data; tx_ant2 = b_data; end
        default:   begin tx_ant1 = a_nc;   tx_ant2 = b_c;    end
      endcase
    end
  end

endmodule
