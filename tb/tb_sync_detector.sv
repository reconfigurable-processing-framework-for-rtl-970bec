// tb_sync_detector: sign correlator for the sync word.  Sends noise, then the
// sync word (each symbol held OSR samples, random amplitudes), and checks that
// exactly one hit comes on the first sample of the last sync symbol; repeats
// with one wrong symbol (hit only with a lowered threshold) and with the
// inverted word (no hit).
module tb_sync_detector;
  import stbc_pkg::*;
  localparam int SL = 8, O = 5;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic sample_valid = 0;
  cplx_t sample = '0;
  logic [SL-1:0] sync_word = 8'b1011_0010;
  logic [$clog2(SL+1)-1:0] threshold = SL;
  logic sync_hit;
  logic [$clog2(SL+1)-1:0] match_count, match_q;

  sync_detector #(.SYNC_LEN(SL), .OSR_P(O)) dut (.*);

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

  int n = 0, hits = 0, hit_at = -1;
  int hit_pos [$];
  always @(posedge clk) if (rst_n && sample_valid) begin
    if (sync_hit) begin hits++; hit_at = n; hit_pos.push_back(n); end
    n++;
  end

  task automatic send(input bit positive);
    int a = 100 + ($urandom % 20000);
    while (($urandom % 4) == 0) begin sample_valid = 0; @(negedge clk); end
    sample_valid = 1;
    sample.re = positive ? 16'(a) : -16'(a);
    sample.im = 16'($signed($urandom) >>> 16);
    @(negedge clk);
    sample_valid = 0;
  endtask

  // noise with no long run matching the word, then the word itself
  task automatic frame(input logic [SL-1:0] w, output int start);
    for (int k = 0; k < 3*SL*O; k++) send((k / 3) % 2 == 0);
    start = n;
    for (int s = SL-1; s >= 0; s--)
      for (int p = 0; p < O; p++) send(w[s]);
    for (int k = 0; k < 2*O; k++) send(0);
  endtask

  initial begin
    int st;
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(sync_word, st);
    check(hits == 1, $sformatf("one hit, got %0d", hits));
    check(hit_at == st + (SL-1)*O, $sformatf("hit position %0d exp %0d", hit_at, st + (SL-1)*O));
    hits = 0;
    frame(sync_word ^ 8'b0000_1000, st);
    check(hits == 0, "no hit with one wrong symbol at full threshold");
    threshold = SL - 1;
    hits = 0;
    frame(sync_word ^ 8'b0000_1000, st);
    check(hits >= 1 && (st + (SL-1)*O) inside {hit_pos}, $sformatf("hit at threshold-1: %0d", hits));
    threshold = SL;
    hits = 0;
    frame(~sync_word, st);
    check(hits == 0, "no hit for the inverted word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
