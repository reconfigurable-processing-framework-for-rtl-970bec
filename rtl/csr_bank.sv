// csr_bank: CPU control and status registers.
//
// NCTRL read/write control registers followed by NSTAT read-only status
// registers, all 32 bits, word offsets 0..NCTRL-1 and NCTRL..NCTRL+NSTAT-1.
// A write to control register i also raises ctrl_wr[i] for that clock, which
// lets a register act as a command (start, arm).  Reads return data one clock
// after the read strobe; offsets beyond the bank read as zero.  Control
// registers reset to zero.
//
// The document shows control registers feeding the state machine and status
// registers fed by it, and an ARM CPU that uses them for user interface and
// debugging; their number, width and layout are this design's choice.
module csr_bank #(
  parameter int unsigned NCTRL = 8,
  parameter int unsigned NSTAT = 8,
  parameter int unsigned AW    = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output logic [31:0]   ctrl    [NCTRL],
  output logic [NCTRL-1:0] ctrl_wr,
  input  logic [31:0]   status  [NSTAT]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTRL; i++) ctrl[i] <= '0;
      ctrl_wr <= '0;
      rdata   <= '0;
    end else begin
      ctrl_wr <= '0;
      for (int i = 0; i < NCTRL; i++) begin
        if (sel && we && 32'(addr) == i) begin
          ctrl[i]    <= wdata;
          ctrl_wr[i] <= 1'b1;
        end
      end
      if (sel && re) begin
        rdata <= '0;
        for (int i = 0; i < NCTRL; i++)
          if (32'(addr) == i) rdata <= ctrl[i];
        for (int j = 0; j < NSTAT; j++)
          if (32'(addr) == NCTRL + j) rdata <= status[j];
      end
    end
  end

endmodule
