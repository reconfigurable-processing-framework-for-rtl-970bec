// tb_fwd_buffer: FWD frame buffer with a small depth (8 samples).
// Writes frames of random length with random gaps, some longer than the
// buffer.  Checks after every clock that count equals the expected fill
// (saturating at DEPTH).  At the end of each frame it reads every stored
// sample through the CPU port (real and imaginary parts) and through the
// decoder port, forwards and reversed, against a model, each with one clock of
// latency.  It also checks that `clear` empties the buffer and that a sample
// offered during `clear` is not stored.
module tb_fwd_buffer;
  localparam int D = 8, W = 32, AW = $clog2(D);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, in_valid = 0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic [$clog2(D+1)-1:0] count;
  logic rd_en = 0;
  logic [AW:0] rd_addr = '0;
  logic [W-1:0] rd_data;
  logic [AW-1:0] b_addr = '0;
  logic signed [W-1:0] b_re, b_im;

  fwd_buffer #(.DEPTH(D), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  int m_re [D], m_im [D];
  int fill;

  task automatic frame(input int len);
    int n, r;
    // clear, with a sample offered at the same time (must be ignored)
    clear = 1; in_valid = 1; in_re = 32'h7777_0000; in_im = 32'h0000_7777;
    @(negedge clk);
    clear = 0; in_valid = 0;
    fill = 0;
    check(count == 0, "count after clear");
    n = 0;
    while (n < len) begin
      r = int'($urandom % 3);
      if (r != 0) begin
        in_valid = 1;
        in_re = $urandom; in_im = $urandom;
        if (fill < D) begin m_re[fill] = in_re; m_im[fill] = in_im; fill++; end
        n++;
      end else in_valid = 0;
      @(negedge clk);
      check(32'(count) == fill, $sformatf("count %0d expected %0d", count, fill));
    end
    in_valid = 0;
    @(negedge clk);
    // CPU reads
    for (int i = 0; i < fill; i++)
      for (int p = 0; p < 2; p++) begin
        rd_en = 1; rd_addr = (AW+1)'(2 * i + p);
        @(negedge clk);
        rd_en = 0;
        check(rd_data == 32'(p != 0 ? m_im[i] : m_re[i]), $sformatf("cpu read %0d.%0d", i, p));
      end
    // decoder port, forwards then reversed
    for (int i = 0; i < fill; i++) begin
      b_addr = AW'(i);
      @(negedge clk);
      check(b_re == m_re[i] && b_im == m_im[i], $sformatf("forward read %0d", i));
    end
    for (int i = fill - 1; i >= 0; i--) begin
      b_addr = AW'(i);
      @(negedge clk);
      check(b_re == m_re[i] && b_im == m_im[i], $sformatf("reversed read %0d", i));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0, "count after reset");
    frame(5);
    frame(D);
    frame(D + 4);     // longer than the buffer: the rest is dropped
    frame(3);         // a short frame after a full one starts again at 0
    for (int k = 0; k < 6; k++) frame(1 + int'($urandom % (D + 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
