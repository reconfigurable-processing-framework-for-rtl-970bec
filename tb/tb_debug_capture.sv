// tb_debug_capture: captures from each of three sources, immediately and
// waiting for a trigger, and reads the buffer back; checks that only valid
// samples of the selected source are stored, the count and done flags, and
// that capturing stops when the buffer is full.
module tb_debug_capture;
  import stbc_pkg::*;
  localparam int NS = 3, D = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic [NS-1:0] src_valid = '0;
  cplx_t src_data [NS];
  logic [1:0] src_sel = '0;
  logic trig_mode = 0, trigger = 0, arm = 0;
  logic capturing, done;
  logic [4:0] count;
  logic rd_en = 0;
  logic [3:0] rd_addr = '0;
  logic [31:0] rd_data;
  debug_capture #(.NSRC(NS), .DEPTH(D)) dut (.*);

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

  // sources: random data, random valid; the bench records what the selected
  // source presented while the capture should be running
  logic [31:0] seen [$];
  bit expect_on = 0;
  always @(negedge clk) begin
    for (int s = 0; s < NS; s++) begin
      src_valid[s] = ($urandom % 2);
      src_data[s]  = $urandom;
    end
  end
  always @(posedge clk) if (rst_n && expect_on && src_valid[src_sel] && seen.size() < D)
    seen.push_back(src_data[src_sel]);

  task automatic run(input int sel, input bit tmode);
    logic [31:0] d;
    seen.delete();
    @(negedge clk) src_sel = 2'(sel); trig_mode = tmode; arm = 1;
    @(negedge clk) arm = 0;
    expect_on = !tmode;
    if (tmode) begin
      repeat (7) @(negedge clk);
      check(!capturing && count == 0, "waits for trigger");
      trigger = 1;                         // capture starts the clock after
      @(negedge clk) trigger = 0; expect_on = 1;
    end
    while (!done) @(negedge clk);
    expect_on = 0;
    check(count == D && !capturing, $sformatf("count %0d", count));
    check(seen.size() == D, "bench saw a full buffer");
    for (int k = 0; k < D; k++) begin
      @(negedge clk) rd_en = 1; rd_addr = 4'(k);
      @(negedge clk) rd_en = 0;
      check(rd_data == seen[k], $sformatf("word %0d: %h exp %h", k, rd_data, seen[k]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0);
    run(2, 1);
    run(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
