// tb_copy_decoder: decodes one 56-bit copy carrying error patterns and
// compares the corrected payload, the per-row flags and the flagged-row count
// with the nearest-codeword reference. Patterns: none, one error in any
// subset of rows, every burst of 1..8 adjacent bits (always corrected), and
// two errors in one row (flagged, beyond the code).
module tb_copy_decoder;
  import tb_jcaebbec_ref_pkg::*;

  logic        clk = 1'b0;
  logic [55:0] code;
  logic [31:0] data;
  logic [7:0]  row_err;
  logic [3:0]  err_cnt;
  int          checks = 0;
  int          failures = 0;
  int          bursts_ok = 0;

  always #5 clk = ~clk;

  copy_decoder dut (.code_i(code), .data_o(data), .row_err_o(row_err), .err_cnt_o(err_cnt));

  // Applies payload m with error mask e; returns 1 when the payload came out
  // intact.
  task automatic run(input logic [31:0] m, input logic [55:0] e, output bit intact);
    logic [31:0] d_ref;
    int          n_ref;
    logic [7:0]  f_ref;
    code = ref_encode(m) ^ e;
    #1;
    ref_decode_copy(code, d_ref, n_ref, f_ref);
    checks += 3;
    if (data !== d_ref)          failures++;
    if (row_err !== f_ref)       failures++;
    if (int'(err_cnt) != n_ref)  failures++;
    if (data !== d_ref || row_err !== f_ref || int'(err_cnt) != n_ref)
      if (failures < 10) $display("m=%h e=%h data=%h/%h flags=%b/%b cnt=%0d/%0d",
                                  m, e, data, d_ref, row_err, f_ref, err_cnt, n_ref);
    intact = (data === m);
  endtask

  initial begin
    bit ok;
    // No error: payload through, nothing flagged.
    for (int n = 0; n < 500; n++) begin
      logic [31:0] m;
      m = $urandom;
      run(m, '0, ok);
      checks++;
      if (!ok || row_err != 0 || err_cnt != 0) failures++;
    end
    // One error in each row of a random subset of rows.
    for (int n = 0; n < 3000; n++) begin
      logic [55:0] e;
      logic [7:0]  rows;
      logic [31:0] m;
      m    = $urandom;
      rows = 8'($urandom);
      e    = '0;
      for (int r = 0; r < 8; r++)
        if (rows[r]) e[8*$urandom_range(6, 0) + r] = 1'b1;
      run(m, e, ok);
      checks += 2;
      if (!ok) failures++;
      if (row_err !== rows) failures++;
    end
    // Bursts of 1..8 adjacent bits at every offset, solid and random inside.
    for (int len = 1; len <= 8; len++)
      for (int s = 0; s + len <= 56; s++)
        for (int solid = 0; solid < 2; solid++) begin
          logic [55:0] e;
          logic [31:0] m;
          m = $urandom;
          e = '0;
          for (int i = s; i < s + len; i++)
            e[i] = (solid == 1) || (i == s) || (i == s + len - 1) || ($urandom_range(1, 0) == 1);
          run(m, e, ok);
          checks++;
          if (!ok) failures++;
          else bursts_ok++;
        end
    // Two errors in one row: flagged, and counted as one row.
    for (int n = 0; n < 1000; n++) begin
      logic [55:0] e;
      logic [31:0] m;
      int          r, a, b;
      m = $urandom;
      r = $urandom_range(7, 0);
      a = $urandom_range(6, 0);
      do b = $urandom_range(6, 0); while (b == a);
      e = '0;
      e[8*a + r] = 1'b1;
      e[8*b + r] = 1'b1;
      run(m, e, ok);
      checks += 2;
      if (!row_err[r]) failures++;
      if (err_cnt != 1) failures++;
    end
    $display("bursts of up to 8 bits corrected: %0d", bursts_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
