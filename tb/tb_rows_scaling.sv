// tb_rows_scaling: runs encoder and decoder back to back at matrix heights
// other than the default (ROWS = 4, 16 and 2: 16-, 64- and 8-bit payloads)
// and checks the properties that carry over to any height: a clean word and
// any single wire error come back intact, and every burst of up to 2*ROWS
// adjacent wires is corrected.
module tb_rows_scaling;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  roundtrip_check #(.ROWS(4))  u_r4  ();
  roundtrip_check #(.ROWS(16)) u_r16 ();
  roundtrip_check #(.ROWS(2))  u_r2  ();

  initial begin
    wait (u_r4.done && u_r16.done && u_r2.done);
    checks   = u_r4.checks + u_r16.checks + u_r2.checks;
    failures = u_r4.failures + u_r16.failures + u_r2.failures;
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
