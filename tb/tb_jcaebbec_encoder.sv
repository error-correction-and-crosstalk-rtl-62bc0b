// tb_jcaebbec_encoder: checks the 112-wire link word against the reference
// (coded copy, duplicated, copy I on even wires and copy II on odd wires),
// and that every pair of adjacent wires 2i/2i+1 carries equal values.
module tb_jcaebbec_encoder;
  import tb_jcaebbec_ref_pkg::*;

  logic         clk = 1'b0;
  logic [31:0]  data;
  logic [111:0] link;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  jcaebbec_encoder dut (.data_i(data), .link_o(link));

  task automatic check_one(input logic [31:0] m);
    data = m;
    #1;
    checks++;
    if (link !== ref_link(m)) begin
      failures++;
      if (failures < 10) $display("mismatch data=%h link=%h exp=%h", m, link, ref_link(m));
    end
    checks++;
    for (int i = 0; i < 56; i++)
      if (link[2*i] !== link[2*i+1]) begin
        failures++;
        break;
      end
  endtask

  initial begin
    check_one('0);
    check_one('1);
    for (int b = 0; b < 32; b++) check_one(32'b1 << b);
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
