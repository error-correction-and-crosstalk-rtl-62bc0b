// copy_decoder: syndrome decoding and single-error correction of one copy.
//
// For every row r of the ROWS x 7 code matrix the decoder recomputes the three
// row checks by XOR-ing the received redundant bit with the received data bits
// it covers:
//   S1 = P1 ^ d0 ^ d1 ^ d3,  S2 = P2 ^ d0 ^ d2 ^ d3,  S3 = P3 ^ d1 ^ d2 ^ d3
// A zero syndrome means the row arrived intact. Otherwise {S3,S2,S1} is the
// Hamming position of one flipped bit: 3, 5, 6 and 7 point at d0, d1, d2 and
// d3, which are inverted; 1, 2 and 4 point at a redundant bit and the data is
// kept. Two or more errors in one row are beyond the code and may be
// miscorrected; they still give a non-zero syndrome unless they form a code
// word. The syndrome equations are the published ones; the row flag and the
// count of flagged rows (used by copy_checker as the copy's "number of
// errors") are this design's reading of what the checker needs.
//
// Interface: code_i (7*ROWS bits, column-wise layout of jcaebbec_pkg) ->
//   data_o     corrected payload, 4*ROWS bits, same order as the encoder input
//   row_err_o  one bit per row, syndrome non-zero
//   err_cnt_o  number of rows with a non-zero syndrome, 0..ROWS
// Timing: purely combinational.
module copy_decoder
  import jcaebbec_pkg::*;
#(
  parameter int unsigned ROWS = jcaebbec_pkg::DEFAULT_ROWS,
  localparam int unsigned CNT_W = $clog2(ROWS + 1)
) (
  input  logic [CODE_COLS*ROWS-1:0] code_i,
  output logic [DATA_COLS*ROWS-1:0] data_o,
  output logic [ROWS-1:0]           row_err_o,
  output logic [CNT_W-1:0]          err_cnt_o
);

  always_comb begin
    err_cnt_o = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      row_code_t  c;
      row_data_t  d;
      logic [2:0] syn;
      for (int unsigned s = 0; s < CODE_COLS; s++) c[s] = code_i[s*ROWS + r];
      d      = {c[COL_D3], c[COL_D2], c[COL_D1], c[COL_D0]};
      syn[0] = c[COL_P1] ^ d[0] ^ d[1] ^ d[3];
      syn[1] = c[COL_P2] ^ d[0] ^ d[2] ^ d[3];
      syn[2] = c[COL_P3] ^ d[1] ^ d[2] ^ d[3];
      unique case (syn)
        3'd3:    d[0] = ~d[0];
        3'd5:    d[1] = ~d[1];
        3'd6:    d[2] = ~d[2];
        3'd7:    d[3] = ~d[3];
        default: ;  // 0: no error; 1, 2, 4: a redundant bit was hit
      endcase
      row_err_o[r] = |syn;
      err_cnt_o    = err_cnt_o + CNT_W'(row_err_o[r]);
      for (int unsigned k = 0; k < DATA_COLS; k++) data_o[k*ROWS + r] = d[k];
    end
  end

endmodule
