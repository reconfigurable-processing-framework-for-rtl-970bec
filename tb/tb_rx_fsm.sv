// tb_rx_fsm: receiver frame controller.  Drives samples with gaps and sync
// hits, and checks the skip offset, the exact training and payload windows,
// frame_done and the frame count, the offset-0 and payload-0 paths, that hits
// outside SEARCH are ignored, and that clearing enable returns to IDLE.
module tb_rx_fsm;
  localparam int TN = 10;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic enable = 0, sample_valid = 0, sync_hit = 0;
  logic [15:0] sync_offset = 3, payload_len = 7;
  logic searching, train_active, train_valid, payload_valid, frame_done;
  logic [31:0] frame_count;
  logic [2:0] state_code;

  rx_fsm #(.TRAIN_N(TN), .LEN_W(16)) dut (.*);

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

  // per-sample log: 0 other, 1 training, 2 payload
  int n = 0, kind [$], dones = 0;
  always @(posedge clk) if (rst_n) begin
    if (sample_valid) begin
      kind.push_back(train_valid ? 1 : payload_valid ? 2 : 0);
      n++;
    end
    if (frame_done) dones++;
  end

  task automatic samp(input bit hit);
    while (($urandom % 3) == 0) begin sample_valid = 0; sync_hit = 0; @(negedge clk); end
    sample_valid = 1; sync_hit = hit;
    @(negedge clk);
    sample_valid = 0; sync_hit = 0;
  endtask

  task automatic run_frame(input int off, input int plen);
    int base, t = 0, p = 0;
    sync_offset = 16'(off); payload_len = 16'(plen);
    samp(0); samp(0);
    check(searching, "searching before sync");
    base = n;
    samp(1);
    for (int k = 0; k < off + TN + plen + 4; k++) begin
      if (k == 2) samp(1);             // a hit outside SEARCH is ignored
      else samp(0);
    end
    for (int k = base + 1; k < base + 1 + off; k++) check(kind[k] == 0, "skip");
    for (int k = base + 1 + off; k < base + 1 + off + TN; k++) begin check(kind[k] == 1, $sformatf("train %0d", k - base)); t++; end
    for (int k = base + 1 + off + TN; k < base + 1 + off + TN + plen; k++) begin check(kind[k] == 2, "payload"); p++; end
    for (int k = base + 1 + off + TN + plen; k < n; k++) check(kind[k] == 0, "after frame");
    check(kind[base] == 0, "sync sample not counted");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(state_code == 0, "idle after reset");
    enable = 1;
    @(negedge clk);
    run_frame(3, 7);
    check(dones == 1 && frame_count == 1, "frame 1 done");
    run_frame(0, 5);
    check(dones == 2 && frame_count == 2, "frame 2 done (no skip)");
    run_frame(2, 0);
    check(dones == 3 && frame_count == 3, "frame 3 done (no payload)");
    // enable cleared mid-frame
    sync_offset = 0; payload_len = 4;
    samp(1); samp(0); samp(0);
    check(train_active, "training");
    @(negedge clk) enable = 0;
    @(negedge clk);
    check(state_code == 0 && !train_active, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
