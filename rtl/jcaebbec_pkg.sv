// jcaebbec_pkg: constants and row-level helpers shared by the JCAEBBEC
// (joint crosstalk avoidance with eight-bit burst error correction) link code.
//
// The 32 message bits M0..M31 form an 8-row by 4-column "Hamming matrix":
// row r holds M(r), M(r+8), M(r+16), M(r+24). Each row is protected by a
// Hamming(7,4) code, so one copy of a flit is 8 x 7 = 56 bits. The copy is
// sent column by column (column c occupies bits [c*ROWS +: ROWS]) in the
// order D0 D1 D2 P3 D3 P2 P1, where Dk is matrix column k and Pk is the k-th
// redundant bit of every row. Because consecutive wires belong to different
// rows, any burst of up to ROWS adjacent bits hits each row at most once and
// is corrected by the per-row single-error correction.
//
// Row parities (equations of the encoder, d0..d3 = the row's four bits):
//   P1 = d0 ^ d1 ^ d3,  P2 = d0 ^ d2 ^ d3,  P3 = d1 ^ d2 ^ d3
// The syndrome {S3,S2,S1} of a received row is the binary position, in the
// classic Hamming(7,4) order (P1 P2 d0 P3 d1 d2 d3 = positions 1..7), of a
// single flipped bit. The matrix shape, the parity equations and the column
// order follow the published scheme; the helper functions are this design's.
package jcaebbec_pkg;

  // Default matrix height: 8 rows of 4 data bits = 32-bit flit payload.
  localparam int unsigned DEFAULT_ROWS = 8;
  localparam int unsigned DATA_COLS = 4;
  localparam int unsigned CODE_COLS = 7;

  // Column slot of each row bit inside one transmitted copy.
  localparam int unsigned COL_D0 = 0;
  localparam int unsigned COL_D1 = 1;
  localparam int unsigned COL_D2 = 2;
  localparam int unsigned COL_P3 = 3;
  localparam int unsigned COL_D3 = 4;
  localparam int unsigned COL_P2 = 5;
  localparam int unsigned COL_P1 = 6;

  // Copy chosen by the checker at the end of the decoder.
  typedef enum logic {
    COPY_I  = 1'b0,
    COPY_II = 1'b1
  } copy_sel_e;

  // One row of the matrix, uncoded and coded (indexed by column slot).
  typedef logic [DATA_COLS-1:0] row_data_t;
  typedef logic [CODE_COLS-1:0] row_code_t;

  // Three redundant bits of a row, returned as {P3, P2, P1}.
  function automatic logic [2:0] row_parity(input row_data_t d);
    return {d[1] ^ d[2] ^ d[3],
            d[0] ^ d[2] ^ d[3],
            d[0] ^ d[1] ^ d[3]};
  endfunction

  // Coded row in transmission order, slot index = column of the copy.
  function automatic row_code_t row_encode(input row_data_t d);
    logic [2:0] p;
    row_code_t  c;
    p = row_parity(d);
    c[COL_D0] = d[0];
    c[COL_D1] = d[1];
    c[COL_D2] = d[2];
    c[COL_P3] = p[2];
    c[COL_D3] = d[3];
    c[COL_P2] = p[1];
    c[COL_P1] = p[0];
    return c;
  endfunction

endpackage
