// stbc_pkg: types and constants shared by the transmitter and receiver
// blocks of the TR-STBC link.
//
// Samples and symbols are complex baseband values carried as a packed
// {re, im} pair of 16-bit two's-complement numbers.  The 16-bit width follows
// the document's reference to 16-bit multiply-accumulate arithmetic; the packing
// itself is a choice of this design.
//
// The CPU reaches every memory and register through one simple word-addressed
// bus (cpu_req_t, 32-bit data, read data returned one clock after the read
// strobe).  The document names the memory interface without describing it, so
// the bus and its address map are this design's own.
package stbc_pkg;

  localparam int unsigned SAMPLE_W = 16;     // bits per I or Q component
  localparam int unsigned OSR      = 5;      // samples per symbol (document: five-fold oversampling)
  localparam int unsigned CPU_AW   = 20;     // CPU word address width
  localparam int unsigned CPU_DW   = 32;     // CPU data width

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic              we;     // write strobe, one clock
    logic              re;     // read strobe, one clock; data returns next clock
    logic [CPU_AW-1:0] addr;   // word address: [19:16] region, [15:0] offset
    logic [CPU_DW-1:0] wdata;
  } cpu_req_t;

  // Address regions of the receiver's CPU map.
  localparam logic [3:0] RX_REG_CSR   = 4'h0;
  localparam logic [3:0] RX_REG_COEF  = 4'h1;
  localparam logic [3:0] RX_REG_CHAN  = 4'h2;
  localparam logic [3:0] RX_REG_DEBUG = 4'h3;
  localparam logic [3:0] RX_REG_FWD1  = 4'h4;
  localparam logic [3:0] RX_REG_FWD2  = 4'h5;

  // Address regions of the transmitter's CPU map.
  localparam logic [3:0] TX_REG_CSR   = 4'h0;
  localparam logic [3:0] TX_REG_RAM   = 4'h1;
  localparam logic [3:0] TX_REG_DEBUG = 4'h2;

endpackage
