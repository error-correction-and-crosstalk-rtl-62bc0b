// tb_jcaebbec_decoder: drives encoded link words with error patterns into the
// decoder and compares payload, chosen copy and uncorrectable flag with the
// reference model. It also checks the guarantees of the code itself: every
// burst of up to 16 adjacent wires and every 1- or 2-wire random error is
// corrected, the chosen copy is COPY_II when copy II alone is clean, and an
// error-free word is passed through untouched.
module tb_jcaebbec_decoder;
  import jcaebbec_pkg::*;
  import tb_jcaebbec_ref_pkg::*;

  logic         clk = 1'b0;
  logic [111:0] link;
  logic [31:0]  data;
  copy_sel_e    sel;
  logic         unc;
  logic [7:0]   rows_a, rows_b;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  jcaebbec_decoder dut (
    .link_i(link), .data_o(data), .sel_o(sel), .uncorrectable_o(unc),
    .err_rows_a_o(rows_a), .err_rows_b_o(rows_b)
  );

  // Returns 1 when the payload was delivered intact and not flagged.
  task automatic run(input logic [31:0] m, input logic [111:0] e, output bit good);
    logic [31:0] d_ref;
    logic        sb_ref, unc_ref;
    int          na, nb;
    link = ref_link(m) ^ e;
    #1;
    ref_decode_link(link, d_ref, sb_ref, unc_ref, na, nb);
    checks += 5;
    if (data !== d_ref)                  failures++;
    if ((sel == COPY_II) !== sb_ref)     failures++;
    if (unc !== unc_ref)                 failures++;
    if ($countones(rows_a) != na)        failures++;
    if ($countones(rows_b) != nb)        failures++;
    if (data !== d_ref || (sel == COPY_II) !== sb_ref || unc !== unc_ref)
      if (failures < 10) $display("m=%h e=%h data=%h/%h sel=%0d/%0d unc=%0d/%0d",
                                  m, e, data, d_ref, sel, sb_ref, unc, unc_ref);
    good = (data === m) && !unc;
  endtask

  initial begin
    bit good;
    // Clean words.
    for (int n = 0; n < 200; n++) begin
      logic [31:0] m;
      m = $urandom;
      run(m, '0, good);
      checks += 2;
      if (!good) failures++;
      if (rows_a != 0 || rows_b != 0) failures++;
    end
    // Bursts of 1..16 adjacent wires at every offset.
    for (int len = 1; len <= 16; len++)
      for (int s = 0; s + len <= 112; s++)
        for (int solid = 0; solid < 2; solid++) begin
          run($urandom, burst_errors(s, len, solid == 1), good);
          checks++;
          if (!good) failures++;
        end
    // Up to two random wire errors.
    for (int k = 1; k <= 2; k++)
      for (int n = 0; n < 3000; n++) begin
        run($urandom, rand_errors(k), good);
        checks++;
        if (!good) failures++;
      end
    // Copy I badly hit (two errors in every row), copy II clean.
    for (int n = 0; n < 200; n++) begin
      logic [111:0] e;
      e = '0;
      for (int r = 0; r < 8; r++) begin
        int a, b;
        a = $urandom_range(6, 0);
        do b = $urandom_range(6, 0); while (b == a);
        e[2*(8*a + r)] = 1'b1;
        e[2*(8*b + r)] = 1'b1;
      end
      run($urandom, e, good);
      checks += 2;
      if (!good) failures++;
      if (sel != COPY_II) failures++;
    end
    // Heavier random errors: compared with the reference only.
    for (int k = 3; k <= 7; k++)
      for (int n = 0; n < 2000; n++) run($urandom, rand_errors(k), good);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
