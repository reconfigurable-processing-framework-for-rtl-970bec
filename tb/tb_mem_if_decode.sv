// tb_mem_if_decode: random accesses to all regions and to unmapped ones.
// Checks the region select and offset of every access, and that read data
// returns one clock later from the addressed region (each target here answers
// with its region number and offset).
module tb_mem_if_decode;
  import stbc_pkg::*;
  localparam int NR = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  cpu_req_t req = '0;
  logic [31:0] rdata;
  logic rvalid;
  logic [NR-1:0] sel;
  logic [15:0] offset;
  logic [31:0] reg_rdata [NR];
  mem_if_decode #(.NREG(NR)) dut (.*);

  // targets: registered read data = {region, offset}
  for (genvar r = 0; r < NR; r++) begin : g_t
    always_ff @(posedge clk) if (sel[r] && req.re) reg_rdata[r] <= {16'(r + 1), offset};
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int reg_n = $urandom % 5;
      automatic logic [15:0] off = 16'($urandom);
      automatic bit is_rd = $urandom % 2;
      @(negedge clk);
      req.addr = {4'(reg_n), off}; req.re = is_rd; req.we = !is_rd; req.wdata = $urandom;
      #1;
      check(sel == ((reg_n < NR) ? NR'(1) << reg_n : '0), $sformatf("sel %b for region %0d", sel, reg_n));
      check(offset == off, "offset");
      @(negedge clk);
      req = '0;
      if (is_rd) begin
        check(rvalid, "rvalid");
        check(rdata == ((reg_n < NR) ? {16'(reg_n + 1), off} : 32'h0), $sformatf("rdata %h region %0d", rdata, reg_n));
      end else check(!rvalid, "no rvalid after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
