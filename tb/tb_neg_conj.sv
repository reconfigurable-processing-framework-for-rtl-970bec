// tb_neg_conj: conjugate and negated conjugate on random and corner values,
// including the saturating negation of -32768.
module tb_neg_conj;
  import stbc_pkg::*;
  cplx_t a, y;
  logic negate;
  neg_conj dut (.*);

  int checks = 0, failures = 0;
  function automatic int nsat(int v); return (v == -32768) ? 32767 : -v; endfunction

  initial begin
    int corner [6] = '{0, 1, -1, 32767, -32768, 12345};
    for (int t = 0; t < 2000; t++) begin
      int r, i;
      r = (t < 36) ? corner[t % 6] : ($signed($urandom) >>> 16);
      i = (t < 36) ? corner[t / 6] : ($signed($urandom) >>> 16);
      for (int ng = 0; ng < 2; ng++) begin
        a.re = 16'(r); a.im = 16'(i); negate = ng[0];
        #1;
        checks++;
        if (ng == 1 ? (int'(y.re) != nsat(r) || int'(y.im) != i)
                    : (int'(y.re) != r || int'(y.im) != nsat(i))) begin
          failures++;
          $display("FAIL a=%0d,%0d neg=%0d y=%0d,%0d", r, i, ng, y.re, y.im);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
