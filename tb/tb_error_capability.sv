// tb_error_capability: measures how often the decoder delivers the right
// payload for the error classes used to rate the code: bursts of 1..16
// adjacent wires at every offset, and 1..7 random wire errors split in every
// way between copy I and copy II (i errors in copy I, k-i in copy II). For
// each class it prints the share of flits delivered intact, flagged
// uncorrectable, and delivered wrong without a flag. Every decoded flit is
// compared with the reference decoder; bursts up to 16 wires and up to two
// random errors must always be delivered intact.
module tb_error_capability;
  import jcaebbec_pkg::*;
  import tb_jcaebbec_ref_pkg::*;

  localparam int TRIALS = 1500;

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

  // 0 = intact, 1 = flagged, 2 = wrong and not flagged.
  task automatic run(input logic [31:0] m, input logic [111:0] e, output int outcome);
    logic [31:0] d_ref;
    logic        sb_ref, unc_ref;
    int          na, nb;
    link = ref_link(m) ^ e;
    #1;
    ref_decode_link(link, d_ref, sb_ref, unc_ref, na, nb);
    checks++;
    if (data !== d_ref || (sel == COPY_II) !== sb_ref || unc !== unc_ref) failures++;
    outcome = unc ? 1 : (data === m) ? 0 : 2;
  endtask

  // k distinct errors on the wires of one copy (0 = even, 1 = odd wires).
  function automatic logic [111:0] copy_errors(input int copy, input int k);
    logic [111:0] e;
    int           n;
    e = '0;
    n = 0;
    while (n < k) begin
      int p;
      p = 2 * int'($urandom_range(55, 0)) + copy;
      if (!e[p]) begin
        e[p] = 1'b1;
        n++;
      end
    end
    return e;
  endfunction

  initial begin
    int outcome;
    // Bursts.
    for (int len = 1; len <= 16; len++) begin
      int ok;
      ok = 0;
      for (int s = 0; s + len <= 112; s++) begin
        run($urandom, burst_errors(s, len, 0), outcome);
        if (outcome == 0) ok++;
        checks++;
        if (outcome != 0) failures++;
      end
      $display("burst %2d wires: %0d/%0d offsets corrected", len, ok, 113 - len);
    end
    // Random errors, by split between the copies.
    for (int k = 1; k <= 7; k++) begin
      int tot_ok;
      tot_ok = 0;
      for (int i = 0; i <= k; i++) begin
        int ok, flag, bad;
        ok = 0; flag = 0; bad = 0;
        for (int n = 0; n < TRIALS; n++) begin
          run($urandom, copy_errors(0, i) | copy_errors(1, k - i), outcome);
          case (outcome)
            0: ok++;
            1: flag++;
            default: bad++;
          endcase
        end
        if (k <= 2) begin
          checks++;
          if (ok != TRIALS) failures++;
        end
        tot_ok += ok;
        $display("random %0d errors (copy I %0d, copy II %0d): intact %5.2f%%  flagged %5.2f%%  wrong %5.2f%%",
                 k, i, k - i, 100.0 * ok / TRIALS, 100.0 * flag / TRIALS, 100.0 * bad / TRIALS);
      end
      $display("random %0d errors, mean over splits: intact %5.2f%%", k, 100.0 * tot_ok / (TRIALS * (k + 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
