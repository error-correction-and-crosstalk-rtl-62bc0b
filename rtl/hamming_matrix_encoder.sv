// hamming_matrix_encoder: one copy of the JCAEBBEC code for a flit payload.
//
// The payload is read as a ROWS x 4 matrix filled column by column: column k
// holds data_i[k*ROWS +: ROWS], so row r is {M(r+3*ROWS), M(r+2*ROWS),
// M(r+ROWS), M(r)}. Each row gets three Hamming(7,4) redundant bits
// (jcaebbec_pkg::row_parity), and the 7*ROWS code bits are laid out column by
// column in the order D0 D1 D2 P3 D3 P2 P1, the arrangement the scheme uses
// on the wires. With ROWS = 8 this turns 32 message bits into 56 code bits
// (24 redundant bits). The code is systematic: 4*ROWS of the outputs are the
// data inputs on new positions, only the 3*ROWS redundant bits are logic.
//
// Interface: data_i (4*ROWS bits) -> code_o (7*ROWS bits), bit
// code_o[c*ROWS + r] is column slot c of row r.
// Timing: purely combinational; the caller registers it.
module hamming_matrix_encoder
  import jcaebbec_pkg::*;
#(
  parameter int unsigned ROWS = jcaebbec_pkg::DEFAULT_ROWS
) (
  input  logic [DATA_COLS*ROWS-1:0] data_i,
  output logic [CODE_COLS*ROWS-1:0] code_o
);

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      row_data_t d;
      row_code_t c;
      for (int unsigned k = 0; k < DATA_COLS; k++) d[k] = data_i[k*ROWS + r];
      c = row_encode(d);
      for (int unsigned s = 0; s < CODE_COLS; s++) code_o[s*ROWS + r] = c[s];
    end
  end

endmodule
