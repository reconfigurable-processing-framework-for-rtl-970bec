// tb_matched_filter: random taps and samples (with gaps), each output compared
// with sum_j conj(h[j]) x[n-L+1+j] computed here from the scaled taps; checks
// the one-clock output latency and that flush clears the delay line.
module tb_matched_filter;
  import stbc_pkg::*;
  localparam int L = 5, SH = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, in_valid = 0;
  logic signed [31:0] h_re [L];
  logic signed [31:0] h_im [L];
  cplx_t in_sample = '0;
  logic out_valid;
  logic signed [31:0] out_re, out_im;
  matched_filter #(.L(L), .H_W(32), .COEF_W(16), .H_SHIFT(SH), .OUT_W(32)) dut (.*);

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

  function automatic int sx16(int v);
    logic signed [15:0] t;
    t = v[15:0];
    return int'(t);
  endfunction

  int xr [$], xi [$];
  int er, ei, pending = 0, outs = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      check(pending == 1, "one output per input, one clock later");
      check(out_re == er && out_im == ei, $sformatf("out %0d: %0d,%0d exp %0d,%0d", outs, out_re, out_im, er, ei));
      outs++;
    end
    pending = 0;
    if (in_valid && !flush) begin
      int n;
      xr.push_back(in_sample.re); xi.push_back(in_sample.im);
      n = xr.size() - 1;
      er = 0; ei = 0;
      for (int j = 0; j < L; j++) begin
        automatic int k = n - L + 1 + j;
        automatic int hr = sx16(h_re[j] >>> SH), hi = sx16(h_im[j] >>> SH);
        automatic int a = (k >= 0) ? xr[k] : 0, b = (k >= 0) ? xi[k] : 0;
        er += hr * a + hi * b;
        ei += hr * b - hi * a;
      end
      pending = 1;
    end
  end

  initial begin
    for (int j = 0; j < L; j++) begin h_re[j] = $urandom; h_im[j] = $urandom; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      @(negedge clk) flush = 1; in_valid = 0;
      @(negedge clk) flush = 0;
      xr.delete(); xi.delete();
      for (int t = 0; t < 40; t++) begin
        in_valid = ($urandom % 4 != 0);
        in_sample = $urandom;
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
    end
    check(outs > 60, $sformatf("outputs %0d", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
