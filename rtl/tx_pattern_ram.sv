// tx_pattern_ram: transmit memory for the sync word, the training sequences
// and the data payload.
//
// One array of DEPTH complex symbols (32-bit words, {re, im}) with a CPU port
// (write, and read with data one clock later) and two read ports, one for each
// transmit antenna's path, also with one clock of read latency.  Which regions
// hold which sequence is set by the sequencer's base-address parameters.
//
// The document describes a large block of memory holding the payload and the
// fixed training and synchronisation sequences; the single shared array, the
// depth and the port arrangement are this design's choice.
module tx_pattern_ram
  import stbc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  // CPU port
  input  logic                     cpu_we,
  input  logic                     cpu_re,
  input  logic [$clog2(DEPTH)-1:0] cpu_addr,
  input  logic [31:0]              cpu_wdata,
  output logic [31:0]              cpu_rdata,
  // sequencer read ports
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  output cplx_t                    a_data,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output cplx_t                    b_data
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cpu_we) mem[cpu_addr] <= cpu_wdata;
    if (cpu_re) cpu_rdata <= mem[cpu_addr];
    a_data <= mem[a_addr];
    b_data <= mem[b_addr];
  end

endmodule
