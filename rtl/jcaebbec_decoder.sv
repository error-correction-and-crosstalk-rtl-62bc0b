// jcaebbec_decoder: received link word to corrected flit payload.
//
// Three stages, all combinational:
//   1. Group separator: the 14*ROWS link wires are split back into the two
//      7*ROWS-bit copies (even wires = copy I, odd wires = copy II), undoing
//      the interleaving of jcaebbec_encoder.
//   2. Two copy_decoder instances compute the row syndromes of each copy and
//      correct one bit per row.
//   3. copy_checker compares the two corrected copies and, when they differ,
//      delivers the one that implies fewer received bit errors over both
//      copies, or flags the flit when neither is better.
// With ROWS = 8 a burst of up to 16 adjacent wires places at most 8
// consecutive bits, one per row, in each copy, so both copies correct it.
// The structure (separator, two decoders, checker/multiplexer) is the
// published one.
//
// Interface: link_i (14*ROWS bits) ->
//   data_o           corrected payload (4*ROWS bits)
//   sel_o            copy that was delivered
//   uncorrectable_o  neither copy could be trusted
//   err_rows_a_o/b_o rows of copy I / copy II with a non-zero syndrome
// Timing: purely combinational.
module jcaebbec_decoder
  import jcaebbec_pkg::*;
#(
  parameter int unsigned ROWS = jcaebbec_pkg::DEFAULT_ROWS
) (
  input  logic [2*CODE_COLS*ROWS-1:0] link_i,
  output logic [DATA_COLS*ROWS-1:0]   data_o,
  output copy_sel_e                   sel_o,
  output logic                        uncorrectable_o,
  output logic [ROWS-1:0]             err_rows_a_o,
  output logic [ROWS-1:0]             err_rows_b_o
);

  localparam int unsigned CODE_W = CODE_COLS * ROWS;
  localparam int unsigned DATA_W = DATA_COLS * ROWS;
  localparam int unsigned CNT_W  = $clog2(ROWS + 1);

  logic [CODE_W-1:0] code_a, code_b;
  logic [DATA_W-1:0] data_a, data_b;
  logic [CNT_W-1:0]  cnt_a, cnt_b;

  // Group separator.
  always_comb begin
    for (int unsigned i = 0; i < CODE_W; i++) begin
      code_a[i] = link_i[2*i];
      code_b[i] = link_i[2*i+1];
    end
  end

  copy_decoder #(.ROWS(ROWS)) u_dec_a (
    .code_i    (code_a),
    .data_o    (data_a),
    .row_err_o (err_rows_a_o),
    .err_cnt_o (cnt_a)
  );

  copy_decoder #(.ROWS(ROWS)) u_dec_b (
    .code_i    (code_b),
    .data_o    (data_b),
    .row_err_o (err_rows_b_o),
    .err_cnt_o (cnt_b)
  );

  copy_checker #(.ROWS(ROWS)) u_checker (
    .code_a_i        (code_a),
    .code_b_i        (code_b),
    .data_a_i        (data_a),
    .cnt_a_i         (cnt_a),
    .data_b_i        (data_b),
    .cnt_b_i         (cnt_b),
    .data_o          (data_o),
    .sel_o           (sel_o),
    .uncorrectable_o (uncorrectable_o)
  );

endmodule
