// sync_detector: finds the synchronisation word in the decimated receive stream.
//
// The sign of the in-phase component of every sample is shifted into a history
// of SYNC_LEN*OSR bits.  Every OSR-th history bit (one per symbol) is compared
// with the expected sync word and the agreeing symbols are counted.  sync_hit
// is raised, in the same clock as the sample that completes the match, when
// the count first reaches the threshold; it is not raised again until the
// count has fallen below the threshold, so one sync word gives one hit.  The
// hit gives the frame controller its frame timing.
//
// Interface
//   sample_valid/sample   decimated complex samples, OSR per symbol.
//   sync_word             expected symbols, bit SYNC_LEN-1 sent first;
//                         1 = positive in-phase amplitude.
//   threshold             agreeing symbols needed for a hit.
//   sync_hit              combinational, qualified by sample_valid.
//   match_count           count for the current history (registered copy of
//                         the last sample's count in match_q).
//
// The document says only that a circuit detects the synchronisation sequence
// in the decimated signal; the sign correlator, the word length and the
// threshold rule are this design's choice.  OSR = 5 follows the document's
// five-fold oversampling.
module sync_detector
  import stbc_pkg::*;
#(
  parameter int unsigned SYNC_LEN = 32,  // symbols in the sync word
  parameter int unsigned OSR_P    = 5    // samples per symbol
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sample_valid,
  input  cplx_t                         sample,
  input  logic [SYNC_LEN-1:0]           sync_word,
  input  logic [$clog2(SYNC_LEN+1)-1:0] threshold,
  output logic                          sync_hit,
  output logic [$clog2(SYNC_LEN+1)-1:0] match_count,
  output logic [$clog2(SYNC_LEN+1)-1:0] match_q
);

  localparam int unsigned HL = SYNC_LEN * OSR_P;
  localparam int unsigned CW = $clog2(SYNC_LEN+1);

  logic [HL-1:0] hist, hist_next;
  logic          above_q;

  assign hist_next = {hist[HL-2:0], ~sample.re[SAMPLE_W-1]};

  always_comb begin
    match_count = '0;
    for (int k = 0; k < SYNC_LEN; k++)
      match_count += CW'(hist_next[k*OSR_P] == sync_word[k]);
  end

  assign sync_hit = sample_valid && (match_count >= threshold) && !above_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist    <= '0;
      above_q <= 1'b0;
      match_q <= '0;
    end else if (sample_valid) begin
      hist    <= hist_next;
      above_q <= (match_count >= threshold);
      match_q <= match_count;
    end
  end

endmodule
