// tb_hamming_matrix_encoder: compares the 56-bit copy produced for directed
// and random payloads with the index-by-index reference encoding, and checks
// that every single payload bit changes exactly the code bits it should.
module tb_hamming_matrix_encoder;
  import tb_jcaebbec_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] data;
  logic [55:0] code;
  int          checks = 0;
  int          failures = 0;

  always #5 clk = ~clk;

  hamming_matrix_encoder dut (.data_i(data), .code_o(code));

  task automatic check_one(input logic [31:0] m);
    data = m;
    #1;
    checks++;
    if (code !== ref_encode(m)) begin
      failures++;
      if (failures < 10) $display("mismatch data=%h code=%h exp=%h", m, code, ref_encode(m));
    end
  endtask

  initial begin
    check_one('0);
    check_one('1);
    // One-hot payloads: each data bit appears once as itself and in 2 or 3
    // redundant bits of its row (column 3 feeds all three).
    for (int b = 0; b < 32; b++) begin
      check_one(32'b1 << b);
      checks++;
      if ($countones(code) != ((b >= 24) ? 4 : 3)) begin
        failures++;
        $display("bit %0d sets %0d code bits", b, $countones(code));
      end
    end
    for (int n = 0; n < 5000; n++) check_one($urandom);
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
