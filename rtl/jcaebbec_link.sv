// jcaebbec_link: one protected router-to-router hop of a network on chip.
//
// The error control sits inside the routers. At the sending router's output
// port a flit payload is coded by jcaebbec_encoder (row-wise Hamming on a
// ROWS x 4 matrix, duplicated and interleaved) and launched from a register
// onto the 14*ROWS link wires (112 for the 32-bit default). At the receiving
// router's input port the wires are captured in a register and decoded by
// jcaebbec_decoder. The wires themselves are outside this module:
// link_tx_o leaves the sender, link_rx_i enters the receiver, and in a
// system they are connected through the physical interconnect.
//
// Each flit carries a valid bit on a separate wire (link_valid_o/_i); the
// code does not protect it. Which register stages exist and the valid wire are
// this design's choices; the code, duplication and decoder follow the
// published scheme.
//
// Interface:
//   tx_valid_i/tx_data_i   flit from the sending router's crossbar
//   link_valid_o/link_tx_o to the link wires
//   link_valid_i/link_rx_i from the link wires
//   rx_valid_o/rx_data_o   corrected flit to the receiving router
//   rx_sel_o               copy delivered (COPY_I / COPY_II)
//   rx_corrected_o         some row of either copy had a non-zero syndrome
//   rx_uncorrectable_o     neither copy could be trusted
// Timing: tx_data_i is on link_tx_o one clock after it is presented; with the
// wires connected, the decoded flit is on rx_data_o two clocks after it was
// presented (one clock from link_rx_i). Active-low synchronous reset clears
// both valid registers; data registers are not reset.
module jcaebbec_link
  import jcaebbec_pkg::*;
#(
  parameter int unsigned ROWS = jcaebbec_pkg::DEFAULT_ROWS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // sending router side
  input  logic                        tx_valid_i,
  input  logic [DATA_COLS*ROWS-1:0]   tx_data_i,
  output logic                        link_valid_o,
  output logic [2*CODE_COLS*ROWS-1:0] link_tx_o,
  // receiving router side
  input  logic                        link_valid_i,
  input  logic [2*CODE_COLS*ROWS-1:0] link_rx_i,
  output logic                        rx_valid_o,
  output logic [DATA_COLS*ROWS-1:0]   rx_data_o,
  output copy_sel_e                   rx_sel_o,
  output logic                        rx_corrected_o,
  output logic                        rx_uncorrectable_o
);

  localparam int unsigned LINK_W = 2 * CODE_COLS * ROWS;

  logic [LINK_W-1:0] enc_word;
  logic [LINK_W-1:0] rx_word_q;
  logic              rx_valid_q;
  logic [ROWS-1:0]   err_rows_a, err_rows_b;

  // Sending router: encode and launch.
  jcaebbec_encoder #(.ROWS(ROWS)) u_encoder (
    .data_i (tx_data_i),
    .link_o (enc_word)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) link_valid_o <= 1'b0;
    else        link_valid_o <= tx_valid_i;
    if (tx_valid_i) link_tx_o <= enc_word;
  end

  // Receiving router: capture and decode.
  always_ff @(posedge clk) begin
    if (!rst_n) rx_valid_q <= 1'b0;
    else        rx_valid_q <= link_valid_i;
    if (link_valid_i) rx_word_q <= link_rx_i;
  end

  jcaebbec_decoder #(.ROWS(ROWS)) u_decoder (
    .link_i          (rx_word_q),
    .data_o          (rx_data_o),
    .sel_o           (rx_sel_o),
    .uncorrectable_o (rx_uncorrectable_o),
    .err_rows_a_o    (err_rows_a),
    .err_rows_b_o    (err_rows_b)
  );

  assign rx_valid_o     = rx_valid_q;
  assign rx_corrected_o = |{err_rows_a, err_rows_b};

endmodule
