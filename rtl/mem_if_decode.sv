// mem_if_decode: the CPU memory interface of one FPGA.
//
// Splits the CPU's word address into a 4-bit region (address bits 19:16) and a
// 16-bit offset, raises the select of the addressed region and returns that
// region's read data.  Every target registers its read data, so the decoder
// remembers which region a read went to and selects that region's data one
// clock later, together with rvalid.  Regions at or above NREG read as zero.
//
// The document shows a memory interface between the CPU and the FPGA's RAM
// and registers without describing it; this bus and map are this design's.
module mem_if_decode
  import stbc_pkg::*;
#(
  parameter int unsigned NREG = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cpu_req_t       req,
  output logic [31:0]    rdata,
  output logic           rvalid,
  output logic [NREG-1:0] sel,
  output logic [15:0]    offset,
  input  logic [31:0]    reg_rdata [NREG]
);

  logic [3:0] region, region_q;
  logic       known_q;

  assign region = req.addr[19:16];
  assign offset = req.addr[15:0];

  always_comb begin
    sel = '0;
    for (int r = 0; r < NREG; r++)
      sel[r] = (region == 4'(r)) && (req.we || req.re);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region_q <= '0;
      known_q  <= 1'b0;
      rvalid   <= 1'b0;
    end else begin
      rvalid <= req.re;
      if (req.re) begin
        region_q <= region;
        known_q  <= 32'(region) < NREG;
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (known_q)
      for (int r = 0; r < NREG; r++)
        if (region_q == 4'(r)) rdata = reg_rdata[r];
  end

endmodule
