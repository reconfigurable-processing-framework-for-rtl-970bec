// tb_tx_sequencer: packet sequencing with small lengths and a model memory
// (one clock read latency) in the bench.  Checks every output sample of two
// packets on both antennas against the packet built here, with an irregular
// tick, OSR = 3; the done pulse, busy, the packet count, and that a start
// while busy is ignored.
module tb_tx_sequencer;
  import stbc_pkg::*;
  localparam int O = 3, SL = 4, TS = 3, DS = 5, DEPTH = 64;
  localparam int T1 = 10, T2 = 20, D1 = 30, D2 = 40;
  localparam int PKT = (SL + TS + 2*DS) * O;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, tick = 0;
  logic busy, done, tx_valid;
  logic [31:0] packet_count;
  logic [5:0] a_addr, b_addr;
  cplx_t a_data, b_data, tx_ant1, tx_ant2;
  logic [1:0] segment;

  tx_sequencer #(.DEPTH(DEPTH), .OSR_P(O), .SYNC_LEN(SL), .TRAIN_SYMS(TS), .DATA_SYMS(DS),
                 .SYNC_BASE(0), .TRAIN1_BASE(T1), .TRAIN2_BASE(T2),
                 .DATA1_BASE(D1), .DATA2_BASE(D2)) dut (.*);

  logic [31:0] mem [DEPTH];
  always_ff @(posedge clk) begin a_data <= mem[a_addr]; b_data <= mem[b_addr]; end

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

  function automatic logic [31:0] nc(logic [31:0] w, bit neg);
    logic signed [15:0] r = w[31:16], i = w[15:0];
    if (neg) r = (r == -16'sd32768) ? 16'sd32767 : -r;
    else     i = (i == -16'sd32768) ? 16'sd32767 : -i;
    return {r, i};
  endfunction

  logic [31:0] e1 [PKT], e2 [PKT];
  int n = 0, dones = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid) begin
      check({tx_ant1} == e1[n % PKT] && {tx_ant2} == e2[n % PKT],
            $sformatf("sample %0d: %h %h exp %h %h", n, tx_ant1, tx_ant2, e1[n % PKT], e2[n % PKT]));
      if (n % PKT == PKT - 1) check(done, "done with the last sample");
      else                    check(!done, "no early done");
      n++;
    end
    if (done) dones++;
  end

  initial begin
    int k = 0;
    for (int a = 0; a < DEPTH; a++) mem[a] = $urandom;
    mem[D2 + 1] = {16'h8000, 16'h0123};
    for (int s = 0; s < SL; s++)  for (int p = 0; p < O; p++) begin e1[k] = mem[s]; e2[k] = 0; k++; end
    for (int s = 0; s < TS; s++)  for (int p = 0; p < O; p++) begin e1[k] = mem[T1+s]; e2[k] = mem[T2+s]; k++; end
    for (int s = 0; s < DS; s++)  for (int p = 0; p < O; p++) begin e1[k] = mem[D1+s]; e2[k] = mem[D2+s]; k++; end
    for (int s = 0; s < DS; s++)  for (int p = 0; p < O; p++) begin
      e1[k] = nc(mem[D2+DS-1-s], 1); e2[k] = nc(mem[D1+DS-1-s], 0); k++;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      forever @(negedge clk) tick = ($urandom % 3 != 0);
    join_none
    for (int p = 0; p < 2; p++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      check(busy, "busy after start");
      repeat (10) @(negedge clk);
      start = 1;                           // ignored while busy
      @(negedge clk) start = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      check(n == PKT * (p + 1), $sformatf("samples %0d", n));
      check(packet_count == p + 1 && dones == p + 1, "packet count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
