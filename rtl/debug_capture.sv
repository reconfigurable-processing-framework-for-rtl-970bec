// debug_capture: debug source multiplexer and debug buffer.
//
// A multiplexer picks one of NSRC internal sample streams (src_sel).  A write
// to the arm command starts a capture: with trig_mode = 0 at once, with
// trig_mode = 1 at the next trigger pulse (e.g. a frame sync).  From then on
// every valid sample of the selected stream is written into the DEPTH-word
// buffer until it is full; done is then set until the next arm.  The CPU reads
// the buffer by word index, data one clock after the read strobe.
//
// The document shows a multiplexer in front of a debug buffer that the CPU
// reads, fed from the signal-path stages; the trigger, depth and arming rules
// are this design's choice.
module debug_capture
  import stbc_pkg::*;
#(
  parameter int unsigned NSRC  = 4,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NSRC-1:0]          src_valid,
  input  cplx_t                    src_data [NSRC],
  input  logic [$clog2(NSRC)-1:0]  src_sel,
  input  logic                     trig_mode,
  input  logic                     trigger,
  input  logic                     arm,
  output logic                     capturing,
  output logic                     done,
  output logic [$clog2(DEPTH):0]   count,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [31:0]              rd_data
);

  logic  waiting;
  logic  s_valid;
  cplx_t s_data;
  logic [31:0] buffer [DEPTH];

  always_comb begin
    s_valid = 1'b0;
    s_data  = '0;
    for (int i = 0; i < NSRC; i++)
      if (src_sel == $clog2(NSRC)'(i)) begin
        s_valid = src_valid[i];
        s_data  = src_data[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting   <= 1'b0;
      capturing <= 1'b0;
      done      <= 1'b0;
      count     <= '0;
    end else if (arm) begin
      waiting   <= trig_mode;
      capturing <= !trig_mode;
      done      <= 1'b0;
      count     <= '0;
    end else begin
      if (waiting && trigger) begin
        waiting   <= 1'b0;
        capturing <= 1'b1;
      end
      if (capturing && s_valid) begin
        count <= count + 1'b1;
        if (count == ($clog2(DEPTH)+1)'(DEPTH - 1)) begin
          capturing <= 1'b0;
          done      <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (capturing && s_valid && !arm)
      buffer[count[$clog2(DEPTH)-1:0]] <= s_data;
    if (rd_en)
      rd_data <= buffer[rd_addr];
  end

endmodule
