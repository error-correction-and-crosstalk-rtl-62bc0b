// copy_checker: the checker and output multiplexer of the JCAEBBEC decoder.
//
// Each copy decoder proposes a corrected payload. The checker scores each
// proposal by the number of received bit errors it implies over both copies:
//   errors(copy I)  = rows copy I corrected (cnt_a_i)
//                   + bits of copy II that differ from copy I's payload
//                     re-encoded with the same Hamming matrix code
//   errors(copy II) = cnt_b_i + bits of copy I that differ from copy II's
//                     payload re-encoded.
// It then decides:
//   * the two proposals agree: no error, or errors both copies could correct;
//     copy I is delivered.
//   * they disagree: the proposal needing fewer errors is delivered, so a copy
//     that was miscorrected (two or more errors in one of its rows) loses to a
//     copy that was corrected properly.
//   * they disagree and need the same number of errors: neither copy can be
//     trusted, uncorrectable_o is raised and copy I is passed on.
// The four cases (no error, both correctable, one correctable, neither) and a
// choice "based on the number of errors" follow the published scheme. How the
// errors are counted, the tie rule and the flag are this design's own, because
// a Hamming(7,4) row cannot tell a double error from a single one by itself.
//
// Interface: code_a_i/code_b_i received copies (7*ROWS bits each, column-wise
//   layout), data_a_i/cnt_a_i and data_b_i/cnt_b_i from the two copy
//   decoders; data_o selected payload, sel_o copy it came from,
//   uncorrectable_o flag.
// Timing: purely combinational.
module copy_checker
  import jcaebbec_pkg::*;
#(
  parameter int unsigned ROWS = jcaebbec_pkg::DEFAULT_ROWS,
  localparam int unsigned CNT_W = $clog2(ROWS + 1)
) (
  input  logic [CODE_COLS*ROWS-1:0] code_a_i,
  input  logic [CODE_COLS*ROWS-1:0] code_b_i,
  input  logic [DATA_COLS*ROWS-1:0] data_a_i,
  input  logic [CNT_W-1:0]          cnt_a_i,
  input  logic [DATA_COLS*ROWS-1:0] data_b_i,
  input  logic [CNT_W-1:0]          cnt_b_i,
  output logic [DATA_COLS*ROWS-1:0] data_o,
  output copy_sel_e                 sel_o,
  output logic                      uncorrectable_o
);

  localparam int unsigned CODE_W = CODE_COLS * ROWS;
  localparam int unsigned SUM_W  = $clog2(CODE_W + ROWS + 1);

  logic [CODE_W-1:0] reenc_a, reenc_b;
  logic [SUM_W-1:0]  errs_a, errs_b;
  logic              agree;

  hamming_matrix_encoder #(.ROWS(ROWS)) u_reenc_a (.data_i(data_a_i), .code_o(reenc_a));
  hamming_matrix_encoder #(.ROWS(ROWS)) u_reenc_b (.data_i(data_b_i), .code_o(reenc_b));

  always_comb begin
    errs_a = SUM_W'(cnt_a_i);
    errs_b = SUM_W'(cnt_b_i);
    for (int unsigned i = 0; i < CODE_W; i++) begin
      errs_a = errs_a + SUM_W'(reenc_a[i] ^ code_b_i[i]);
      errs_b = errs_b + SUM_W'(reenc_b[i] ^ code_a_i[i]);
    end
    agree           = (data_a_i == data_b_i);
    sel_o           = (!agree && errs_b < errs_a) ? COPY_II : COPY_I;
    uncorrectable_o = !agree && (errs_a == errs_b);
    data_o          = (sel_o == COPY_II) ? data_b_i : data_a_i;
  end

  // A flagged result always comes from copy I, and agreeing copies are never
  // flagged.
  always_comb begin
    if (uncorrectable_o) assert (sel_o == COPY_I);
    if (agree)           assert (!uncorrectable_o);
  end

endmodule
