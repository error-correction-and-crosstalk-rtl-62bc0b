// tb_copy_checker: drives the checker with two received copies, the payloads
// proposed for them and the row counts, and compares its choice with the
// checker rule written out independently: score = rows corrected in the own
// copy + bits of the other received copy that differ from the proposal
// re-encoded (reference encoder); agreeing proposals give copy I, otherwise
// the lower score wins and a tie is flagged. Directed cases cover the four
// decision scenarios, then random ones follow.
module tb_copy_checker;
  import jcaebbec_pkg::*;
  import tb_jcaebbec_ref_pkg::*;

  logic        clk = 1'b0;
  logic [55:0] code_a, code_b;
  logic [31:0] da, db, dout;
  logic [3:0]  ca, cb;
  copy_sel_e   sel;
  logic        unc;
  int          checks = 0;
  int          failures = 0;

  always #5 clk = ~clk;

  copy_checker dut (
    .code_a_i(code_a), .code_b_i(code_b),
    .data_a_i(da), .cnt_a_i(ca), .data_b_i(db), .cnt_b_i(cb),
    .data_o(dout), .sel_o(sel), .uncorrectable_o(unc)
  );

  task automatic apply(input logic [55:0] xa, input logic [55:0] xb,
                       input logic [31:0] a, input int na, input logic [31:0] b, input int nb);
    int ta, tb;
    bit exp_sel_b, exp_unc;
    code_a = xa; code_b = xb;
    da = a; ca = 4'(na); db = b; cb = 4'(nb);
    #1;
    ta        = na + $countones(ref_encode(a) ^ xb);
    tb        = nb + $countones(ref_encode(b) ^ xa);
    exp_sel_b = (a != b) && (tb < ta);
    exp_unc   = (a != b) && (ta == tb);
    checks += 3;
    if (dout !== (exp_sel_b ? b : a))     failures++;
    if ((sel == COPY_II) !== exp_sel_b)   failures++;
    if (unc !== exp_unc)                  failures++;
    if (dout !== (exp_sel_b ? b : a) || (sel == COPY_II) !== exp_sel_b || unc !== exp_unc)
      if (failures < 10) $display("a=%h/%0d b=%h/%0d -> %h sel=%0d unc=%0d", a, na, b, nb, dout, sel, unc);
  endtask

  // Directed case with an explicit expectation as well.
  task automatic expect_out(input logic [31:0] d, input bit sel_b, input bit u);
    checks++;
    if (dout !== d || (sel == COPY_II) !== sel_b || unc !== u) begin
      failures++;
      $display("directed case: got %h sel=%0d unc=%0d, expected %h sel=%0d unc=%0d",
               dout, sel, unc, d, sel_b, u);
    end
  endtask

  initial begin
    logic [31:0] x, y;
    logic [55:0] cx, cy;
    x  = 32'hdeadbeef;
    y  = 32'hdeadbeee;   // differs from x in M0: 3 code bits apart
    cx = ref_encode(x);
    cy = ref_encode(y);
    // No error in either copy.
    apply(cx, cx, x, 0, x, 0);
    expect_out(x, 0, 0);
    // Both copies corrected to the same value.
    apply(cx ^ 56'h1, cx ^ 56'h2, x, 1, x, 1);
    expect_out(x, 0, 0);
    // Copy I took two errors in row 0 (M0 and its second parity) and was
    // miscorrected to y; copy II is clean.
    apply(cx ^ 56'h1 ^ (56'h1 << 40), cx, y, 1, x, 0);
    expect_out(x, 1, 0);
    // The same in copy II, copy I clean.
    apply(cx, cx ^ 56'h1 ^ (56'h1 << 40), x, 0, y, 1);
    expect_out(x, 0, 0);
    // Copy I holds x, copy II holds y exactly: neither can be trusted.
    apply(cx, cy, x, 0, y, 0);
    expect_out(x, 0, 1);
    // Random.
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] a, b;
      logic [55:0] xa, xb;
      a  = $urandom;
      b  = ($urandom_range(3, 0) == 0) ? a : a ^ (32'h1 << $urandom_range(31, 0));
      xa = ref_encode(a) ^ (56'h1 << $urandom_range(55, 0)) ^ (56'h1 << $urandom_range(55, 0));
      xb = ref_encode(($urandom_range(1, 0) == 1) ? a : b) ^ (56'h1 << $urandom_range(55, 0));
      apply(xa, xb, a, $urandom_range(8, 0), b, $urandom_range(8, 0));
    end
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
