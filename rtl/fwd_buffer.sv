// fwd_buffer: frame buffer for one matched filter's forward output (FWD 1 or
// FWD 2).
//
// The receiver's time-reversal decoder needs a whole block of matched-filter
// output before it can combine it: the reversed stream is the forward one read
// backwards.  This buffer keeps the outputs of the current frame.
//
// Writes: `clear` (held by the receiver during the training window) empties
// the buffer.  Each `in_valid` sample is then written at address `count`, and
// `count` advances until the buffer holds DEPTH samples.  Later samples of an
// over-long payload are dropped, and `count` saturates at DEPTH.
//
// Reads: two registered read ports, one clock of latency each.
//   - CPU: rd_addr = {index, part}, where part 0 is the real part and part 1
//     the imaginary part.
//   - Decoder (b port): b_addr = index gives b_re/b_im.  Any order, so that
//     both forward and reversed reads are possible.
//
// The receiver figure shows FWD 1 and FWD 2 as memories between the matched
// filters and the linear combiner.  Their depth, the clear-at-training rule
// and the port layout are this design's choice.
module fwd_buffer #(
  parameter int unsigned DEPTH = 2560,   // samples per frame (2 data blocks x 256 symbols x 5)
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       in_valid,
  input  logic signed [W-1:0]        in_re,
  input  logic signed [W-1:0]        in_im,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic                       rd_en,
  input  logic [$clog2(DEPTH):0]     rd_addr,
  output logic [W-1:0]               rd_data,
  input  logic [$clog2(DEPTH)-1:0]   b_addr,
  output logic signed [W-1:0]        b_re,
  output logic signed [W-1:0]        b_im
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem_re [DEPTH];
  logic [W-1:0] mem_im [DEPTH];

  // write side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (clear)
      count <= '0;
    else if (in_valid && 32'(count) < DEPTH)
      count <= count + 1'b1;
  end

  always_ff @(posedge clk)
    if (!clear && in_valid && 32'(count) < DEPTH) begin
      mem_re[AW'(count)] <= in_re;
      mem_im[AW'(count)] <= in_im;
    end

  // CPU read port
  always_ff @(posedge clk)
    if (rd_en)
      rd_data <= rd_addr[0] ? mem_im[rd_addr[AW:1]] : mem_re[rd_addr[AW:1]];

  // decoder read port
  always_ff @(posedge clk) begin
    b_re <= mem_re[b_addr];
    b_im <= mem_im[b_addr];
  end

endmodule
