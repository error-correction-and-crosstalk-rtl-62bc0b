// jcaebbec_encoder: flit payload to protected, duplicated link word.
//
// The payload is first coded by hamming_matrix_encoder (row-wise Hamming(7,4)
// on a ROWS x 4 matrix, 7*ROWS code bits). The duplication stage then sends
// that copy twice and interleaves the two copies so that code bit i of copy I
// and code bit i of copy II sit on adjacent wires:
//   link_o[2*i]   = copy I, code bit i
//   link_o[2*i+1] = copy II, code bit i
// A wire therefore always switches in the same direction as at least one of
// its neighbours, which limits crosstalk, and a burst of up to 2*ROWS adjacent
// wires hits at most ROWS consecutive bits of each copy. The code and the
// interleaving follow the published scheme; which copy takes the even wires
// is this design's choice.
//
// Interface: data_i (4*ROWS bits) -> link_o (14*ROWS bits, 112 for ROWS = 8).
// Timing: purely combinational.
module jcaebbec_encoder
  import jcaebbec_pkg::*;
#(
  parameter int unsigned ROWS = jcaebbec_pkg::DEFAULT_ROWS
) (
  input  logic [DATA_COLS*ROWS-1:0]   data_i,
  output logic [2*CODE_COLS*ROWS-1:0] link_o
);

  localparam int unsigned CODE_W = CODE_COLS * ROWS;

  logic [CODE_W-1:0] code;

  hamming_matrix_encoder #(.ROWS(ROWS)) u_hamming (
    .data_i (data_i),
    .code_o (code)
  );

  // Duplication: two copies of the same code, bit-interleaved on the link.
  always_comb begin
    for (int unsigned i = 0; i < CODE_W; i++) begin
      link_o[2*i]   = code[i];
      link_o[2*i+1] = code[i];
    end
  end

endmodule
