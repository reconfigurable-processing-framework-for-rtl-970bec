// tb_stbc_tx: transmitter with small packet sizes.  Loads the pattern memory
// through the CPU interface, starts two packets with an irregular tick, and
// checks every antenna sample against the packet built here, the status
// registers, memory readback and the debug buffer (antenna 1, started by the
// start command).
module tb_stbc_tx;
  import stbc_pkg::*;
  localparam int SL = 4, TS = 3, DS = 5, DEPTH = 64, DBG = 16;
  localparam int T1 = SL, T2 = SL + TS, D1 = SL + 2*TS, D2 = D1 + DS, USED = D2 + DS;
  localparam int PKT = (SL + TS + 2*DS) * OSR;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  cpu_req_t cpu_req = '0;
  logic [31:0] cpu_rdata;
  logic cpu_rvalid, tick = 0, tx_valid, tx_done;
  cplx_t tx_ant1, tx_ant2;

  stbc_tx #(.DEPTH(DEPTH), .SYNC_LEN(SL), .TRAIN_SYMS(TS), .DATA_SYMS(DS), .DBG_DEPTH(DBG)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk) cpu_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    @(negedge clk) cpu_req = '0;
  endtask
  task automatic rd(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk) cpu_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    @(negedge clk) cpu_req = '0;
    check(cpu_rvalid, "rvalid");
    d = cpu_rdata;
  endtask

  function automatic logic [31:0] nc(logic [31:0] w, bit neg);
    logic signed [15:0] r, i;
    r = w[31:16]; i = w[15:0];
    if (neg) r = (r == -16'sd32768) ? 16'sd32767 : -r;
    else     i = (i == -16'sd32768) ? 16'sd32767 : -i;
    return {r, i};
  endfunction

  logic [31:0] mem [DEPTH];
  logic [31:0] e1 [PKT], e2 [PKT];
  int n = 0, dones = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid) begin
      check({tx_ant1} == e1[n % PKT] && {tx_ant2} == e2[n % PKT], $sformatf("sample %0d", n));
      n++;
    end
    if (tx_done) dones++;
  end

  initial begin
    int k = 0;
    logic [31:0] d;
    for (int a = 0; a < DEPTH; a++) mem[a] = (a < USED) ? $urandom : 0;
    for (int s = 0; s < SL; s++) for (int p = 0; p < OSR; p++) begin e1[k] = mem[s]; e2[k] = 0; k++; end
    for (int s = 0; s < TS; s++) for (int p = 0; p < OSR; p++) begin e1[k] = mem[T1+s]; e2[k] = mem[T2+s]; k++; end
    for (int s = 0; s < DS; s++) for (int p = 0; p < OSR; p++) begin e1[k] = mem[D1+s]; e2[k] = mem[D2+s]; k++; end
    for (int s = 0; s < DS; s++) for (int p = 0; p < OSR; p++) begin
      e1[k] = nc(mem[D2+DS-1-s], 1); e2[k] = nc(mem[D1+DS-1-s], 0); k++;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < USED; a++) wr(20'h1_0000 | 20'(a), mem[a]);
    for (int a = 0; a < USED; a += 3) begin rd(20'h1_0000 | 20'(a), d); check(d == mem[a], "ram readback"); end
    wr(20'h0_0001, 32'h100);                 // debug antenna 1, wait for start
    wr(20'h0_0002, 1);                       // arm
    fork
      forever @(negedge clk) tick = ($urandom % 4 != 0);
    join_none
    for (int p = 0; p < 2; p++) begin
      wr(20'h0_0000, 1);
      rd(20'h0_0004, d); check(d == 1, "busy");
      do rd(20'h0_0004, d); while (d != 0);
      rd(20'h0_0005, d); check(d == p + 1, $sformatf("packets %0d", d));
    end
    repeat (4) @(negedge clk);
    check(n == 2*PKT && dones == 2, $sformatf("samples %0d dones %0d", n, dones));
    rd(20'h0_0006, d); check(d[31] && d[15:0] == DBG, $sformatf("debug status %h", d));
    for (int j = 0; j < DBG; j++) begin rd(20'h2_0000 | 20'(j), d); check(d == e1[j], $sformatf("debug %0d", j)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
