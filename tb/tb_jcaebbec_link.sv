// tb_jcaebbec_link: end-to-end test of one protected hop at the default size
// (32-bit flits, 112 link wires). The testbench connects link_tx_o to
// link_rx_i through a model of the noisy wires that XORs a per-flit error
// pattern onto them, sends a stream of flits with idle gaps, and checks every
// delivered flit against the reference decoder: payload, chosen copy,
// correction and uncorrectable flags, and a latency of exactly two clocks.
// It counts how often each decoder scenario occurred (clean flit, errors
// corrected in both copies, a 16-wire burst, copy II chosen over a corrupted
// copy I, copy I chosen over a corrupted copy II, neither copy trusted) and
// fails if any of them never happened. On the launched wires it also checks
// the crosstalk property of the duplication: no wire ever switches while both
// of its neighbours switch the other way.
module tb_jcaebbec_link;
  import jcaebbec_pkg::*;
  import tb_jcaebbec_ref_pkg::*;

  localparam int NFLITS  = 4000;
  localparam int LATENCY = 2;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         tx_valid;
  logic [31:0]  tx_data;
  logic         link_valid;
  logic [111:0] link_tx, link_rx;
  logic         rx_valid;
  logic [31:0]  rx_data;
  copy_sel_e    rx_sel;
  logic         rx_corrected, rx_unc;

  logic [111:0] err_next, err_on_wire;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // Scenario counters.
  int n_clean = 0, n_both_fixed = 0, n_burst16 = 0, n_pick_b = 0, n_pick_a = 0;
  int n_unc = 0, n_idle = 0, n_link_words = 0;

  typedef struct {
    logic [31:0]  data;
    logic [111:0] err;
    int           cycle;
    bit           burst16;
  } flit_t;

  flit_t sent[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  jcaebbec_link dut (
    .clk                (clk),
    .rst_n              (rst_n),
    .tx_valid_i         (tx_valid),
    .tx_data_i          (tx_data),
    .link_valid_o       (link_valid),
    .link_tx_o          (link_tx),
    .link_valid_i       (link_valid),
    .link_rx_i          (link_rx),
    .rx_valid_o         (rx_valid),
    .rx_data_o          (rx_data),
    .rx_sel_o           (rx_sel),
    .rx_corrected_o     (rx_corrected),
    .rx_uncorrectable_o (rx_unc)
  );

  // Crosstalk: with duplication no link wire may ever see both of its
  // neighbours switch against it in the same clock.
  logic [111:0] link_prev;
  always @(posedge clk) begin
    if (rst_n && link_valid) begin
      logic [111:0] up, down;
      up   = ~link_prev & link_tx;
      down = link_prev & ~link_tx;
      checks++;
      n_link_words++;
      for (int j = 1; j < 111; j++)
        if ((up[j] && down[j-1] && down[j+1]) || (down[j] && up[j-1] && up[j+1])) begin
          failures++;
          $display("wire %0d switches against both neighbours", j);
          break;
        end
    end
    link_prev <= link_tx;
  end

  // Noisy wires: the pattern chosen for a flit travels with it.
  always_ff @(posedge clk) if (tx_valid) err_on_wire <= err_next;
  assign link_rx = link_tx ^ err_on_wire;

  // Two errors in one row of one copy (copy 0 = I on even wires).
  function automatic logic [111:0] row_double(input int copy, input int r);
    logic [111:0] e;
    int a, b;
    a = $urandom_range(6, 0);
    do b = $urandom_range(6, 0); while (b == a);
    e = '0;
    e[2*(8*a + r) + copy] = 1'b1;
    e[2*(8*b + r) + copy] = 1'b1;
    return e;
  endfunction

  // Driver.
  initial begin
    rst_n    = 1'b0;
    tx_valid = 1'b0;
    tx_data  = '0;
    err_next = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NFLITS; n++) begin
      flit_t f;
      int    kind;
      @(negedge clk);
      if ($urandom_range(7, 0) == 0) begin
        tx_valid = 1'b0;
        n_idle++;
        @(negedge clk);
      end
      f.data    = $urandom;
      f.burst16 = 0;
      kind      = $urandom_range(7, 0);
      case (kind)
        0: f.err = '0;
        1: begin
          f.err     = burst_errors($urandom_range(96, 0), 16, $urandom_range(1, 0) == 1);
          f.burst16 = 1;
        end
        2: f.err = burst_errors($urandom_range(100, 0), $urandom_range(12, 1), 0);
        3: f.err = rand_errors($urandom_range(2, 1));
        4: f.err = row_double(0, $urandom_range(7, 0)) | row_double(0, $urandom_range(7, 0));
        5: f.err = row_double(1, $urandom_range(7, 0)) | row_double(1, $urandom_range(7, 0))
                 | row_double(1, $urandom_range(7, 0)) | rand_errors(1) & {56{2'b01}};
        6: f.err = row_double(0, $urandom_range(7, 0)) | row_double(1, $urandom_range(7, 0));
        default: f.err = rand_errors($urandom_range(7, 3));
      endcase
      f.cycle  = cycle;
      tx_valid = 1'b1;
      tx_data  = f.data;
      err_next = f.err;
      sent.push_back(f);
    end
    @(negedge clk);
    tx_valid = 1'b0;
    repeat (LATENCY + 3) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("%0d flits never delivered", sent.size());
    end
    checks++;
    if (n_clean == 0 || n_both_fixed == 0 || n_burst16 == 0 || n_pick_b == 0 ||
        n_pick_a == 0 || n_unc == 0 || n_idle == 0 || n_link_words == 0) begin
      failures++;
      $display("a scenario never occurred");
    end
    $display("clean=%0d both_copies_corrected=%0d burst16=%0d copy_II_chosen=%0d copy_I_chosen_over_bad_II=%0d uncorrectable=%0d idle_gaps=%0d link_words_checked=%0d",
             n_clean, n_both_fixed, n_burst16, n_pick_b, n_pick_a, n_unc, n_idle, n_link_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: sample just before the rising edge.
  always @(negedge clk) begin
    if (rst_n && rx_valid) begin
      if (sent.size() == 0) begin
        failures++;
        $display("unexpected flit");
      end else begin
        flit_t       f;
        logic [31:0] d_ref;
        logic        sb_ref, unc_ref;
        int          na, nb;
        logic [111:0] w;
        f = sent.pop_front();
        w = ref_link(f.data) ^ f.err;
        ref_decode_link(w, d_ref, sb_ref, unc_ref, na, nb);
        checks += 5;
        if (cycle - f.cycle != LATENCY)       failures++;
        if (rx_data !== d_ref)                failures++;
        if ((rx_sel == COPY_II) !== sb_ref)   failures++;
        if (rx_unc !== unc_ref)               failures++;
        if (rx_corrected !== (na + nb != 0))  failures++;
        if (cycle - f.cycle != LATENCY || rx_data !== d_ref || (rx_sel == COPY_II) !== sb_ref || rx_unc !== unc_ref)
          if (failures < 10)
            $display("flit %h err %h: got %h sel=%0d unc=%0d lat=%0d, expected %h sel=%0d unc=%0d",
                     f.data, f.err, rx_data, rx_sel, rx_unc, cycle - f.cycle, d_ref, sb_ref, unc_ref);
        // Flits the code guarantees: clean, bursts up to 16 wires, 1-2 errors.
        if (f.burst16 || $countones(f.err) <= 2) begin
          checks++;
          if (rx_data !== f.data || rx_unc) failures++;
        end
        if (f.err == 0) n_clean++;
        if (f.burst16 && rx_data === f.data) n_burst16++;
        if (na != 0 && nb != 0 && !rx_unc && rx_data === f.data) n_both_fixed++;
        if (rx_sel == COPY_II && rx_data === f.data) n_pick_b++;
        if (rx_sel == COPY_I && nb > na && rx_data === f.data) n_pick_a++;
        if (rx_unc) n_unc++;
      end
    end
  end

  initial begin
    repeat (NFLITS * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
