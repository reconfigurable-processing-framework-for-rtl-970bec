// neg_conj: complex conjugate of a symbol, optionally negated.
//
// negate = 1 gives -conj(a) = -re + j im, negate = 0 gives conj(a) = re - j im.
// Negating the most negative 16-bit value saturates to the most positive one
// instead of wrapping.  Purely combinational.
//
// The document's transmitter figure places a -conj() block in the data path
// of the time-reversal STBC encoder; the plain-conjugate setting serves the
// second antenna, whose time-reversed block is conj() in the usual TR-STBC
// arrangement (a reading of this design, the document does not spell it out).
module neg_conj
  import stbc_pkg::*;
(
  input  cplx_t a,
  input  logic  negate,
  output cplx_t y
);

  function automatic logic signed [SAMPLE_W-1:0] sat_neg(logic signed [SAMPLE_W-1:0] v);
    if (v == {1'b1, {(SAMPLE_W-1){1'b0}}}) return {1'b0, {(SAMPLE_W-1){1'b1}}};
    return -v;
  endfunction

  always_comb begin
    y.re = negate ? sat_neg(a.re) : a.re;
    y.im = negate ? a.im          : sat_neg(a.im);
  end

endmodule
