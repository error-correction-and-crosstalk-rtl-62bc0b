// roundtrip_check: helper of tb_rows_scaling. Encodes random payloads with
// jcaebbec_encoder, flips link wires and decodes with jcaebbec_decoder, all at
// the given ROWS, and counts payloads that do not come back intact.
module roundtrip_check #(
  parameter int unsigned ROWS = 4
) ();
  import jcaebbec_pkg::*;

  localparam int unsigned DW = 4 * ROWS;
  localparam int unsigned LW = 14 * ROWS;

  logic [DW-1:0] data_in, data_out;
  logic [LW-1:0] link, err;
  copy_sel_e     sel;
  logic          unc;
  logic [ROWS-1:0] rows_a, rows_b;
  int            checks = 0;
  int            failures = 0;
  bit            done = 0;

  jcaebbec_encoder #(.ROWS(ROWS)) u_enc (.data_i(data_in), .link_o(link));
  jcaebbec_decoder #(.ROWS(ROWS)) u_dec (
    .link_i(link ^ err), .data_o(data_out), .sel_o(sel), .uncorrectable_o(unc),
    .err_rows_a_o(rows_a), .err_rows_b_o(rows_b)
  );

  function automatic logic [DW-1:0] rand_payload();
    logic [DW-1:0] v;
    for (int i = 0; i < DW; i++) v[i] = 1'($urandom_range(1, 0));
    return v;
  endfunction

  task automatic try(input logic [LW-1:0] e);
    data_in = rand_payload();
    err     = e;
    #1;
    checks++;
    if (data_out !== data_in || unc) begin
      failures++;
      if (failures < 5) $display("ROWS=%0d: err %h, sent %h got %h unc %0d", ROWS, e, data_in, data_out, unc);
    end
  endtask

  initial begin
    try('0);
    for (int p = 0; p < int'(LW); p++) try(LW'(1) << p);
    for (int len = 1; len <= int'(2 * ROWS); len++)
      for (int s = 0; s + len <= int'(LW); s++) begin
        logic [LW-1:0] e;
        e = '0;
        for (int i = s; i < s + len; i++) e[i] = 1'b1;
        try(e);
      end
    done = 1;
  end
endmodule
