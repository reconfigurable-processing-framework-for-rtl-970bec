// tb_csr_bank: writes and reads every control register, reads status
// registers and an unmapped offset, checks the one-clock write strobes, that
// an unselected access does nothing, and the one-clock read latency.
module tb_csr_bank;
  localparam int NC = 4, NS = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic sel = 0, we = 0, re = 0;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ctrl [NC];
  logic [NC-1:0] ctrl_wr;
  logic [31:0] status [NS];
  csr_bank #(.NCTRL(NC), .NSTAT(NS), .AW(8)) dut (.*);

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

  task automatic wr(input logic s, input int a, input logic [31:0] d);
    @(negedge clk) sel = s; we = 1; addr = 8'(a); wdata = d;
    @(negedge clk) we = 0; sel = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk) sel = 1; re = 1; addr = 8'(a);
    @(negedge clk) re = 0; sel = 0;
    d = rdata;
  endtask

  initial begin
    logic [31:0] v [NC];
    logic [31:0] d;
    for (int s = 0; s < NS; s++) status[s] = 32'h5000_0000 + s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NC; i++) check(ctrl[i] == 0, "reset value");
    for (int i = 0; i < NC; i++) begin
      v[i] = $urandom;
      @(negedge clk) sel = 1; we = 1; addr = 8'(i); wdata = v[i];
      @(negedge clk) we = 0; sel = 0;
      check(ctrl_wr == (NC'(1) << i), $sformatf("strobe %0d: %b", i, ctrl_wr));
      @(negedge clk);
      check(ctrl_wr == 0, "strobe one clock");
    end
    wr(0, 1, 32'hDEAD_0000);                 // not selected: ignored
    for (int i = 0; i < NC; i++) begin rd(i, d); check(d == v[i] && ctrl[i] == v[i], $sformatf("ctrl %0d", i)); end
    for (int s = 0; s < NS; s++) begin rd(NC + s, d); check(d == status[s], $sformatf("status %0d", s)); end
    rd(NC + NS, d); check(d == 0, "unmapped reads zero");
    wr(1, NC, 32'h1234);                     // status is read-only
    rd(NC, d); check(d == status[0], "status not writable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
