// End-to-end testbench for lp_bist_datapath. Four datapaths run side by
// side, one per multiplier/adder pair: carry-save array with carry lookahead
// (all parameters at their defaults), carry-save with Brent-Kung, Booth
// Wallace with carry lookahead, Booth Wallace with Brent-Kung. The sequence:
// normal multiply-accumulate operations with random operands and clears; a
// complete self-test, with the operands of every cycle compared against the
// reference pattern generator, at most one operand bit changing per vector,
// the start-to-done cycle count checked against 256 x (number of slices) + 2
// and the signature against the reference; normal operation again; a
// second self-test that must give the same signature. It counts how often
// each mechanism occurred (mode switches, slice loads that changed an operand
// bit and loads that did not, Gray code advances, final loads, normal
// accumulations and clears) and fails if one never occurred.
module tb_lp_bist_datapath;
  import lp_bist_pkg::*;
  import lp_tpg_model_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned AW = 32;
  localparam int unsigned ND = 4;

  logic clk = 1'b0, rst_n = 1'b0, bist_start = 1'b0, mac_en = 1'b0, acc_clr = 1'b0;
  logic [N-1:0]  a_in = '0, b_in = '0;
  logic [N-1:0]  op_x [ND], op_y [ND];
  logic [AW-1:0] acc  [ND];
  logic [ND-1:0] test_mode, bist_done;

  int checks = 0, failures = 0;
  int n_mode_switch = 0, n_load_change = 0, n_load_same = 0, n_code_adv = 0;
  int n_final = 0, n_mac = 0, n_clr = 0, n_done = 0;

  // Default datapath: no parameter overrides.
  lp_bist_datapath dut0 (
    .clk, .rst_n, .bist_start, .a_in, .b_in, .mac_en, .acc_clr,
    .op_x(op_x[0]), .op_y(op_y[0]), .acc_out(acc[0]), .test_mode(test_mode[0]), .bist_done(bist_done[0]));
  lp_bist_datapath #(.MULT_ARCH(MULT_CSA), .ADD_ARCH(ADD_BKA)) dut1 (
    .clk, .rst_n, .bist_start, .a_in, .b_in, .mac_en, .acc_clr,
    .op_x(op_x[1]), .op_y(op_y[1]), .acc_out(acc[1]), .test_mode(test_mode[1]), .bist_done(bist_done[1]));
  lp_bist_datapath #(.MULT_ARCH(MULT_BWM), .ADD_ARCH(ADD_CLA)) dut2 (
    .clk, .rst_n, .bist_start, .a_in, .b_in, .mac_en, .acc_clr,
    .op_x(op_x[2]), .op_y(op_y[2]), .acc_out(acc[2]), .test_mode(test_mode[2]), .bist_done(bist_done[2]));
  lp_bist_datapath #(.MULT_ARCH(MULT_BWM), .ADD_ARCH(ADD_BKA)) dut3 (
    .clk, .rst_n, .bist_start, .a_in, .b_in, .mac_en, .acc_clr,
    .op_x(op_x[3]), .op_y(op_y[3]), .acc_out(acc[3]), .test_mode(test_mode[3]), .bist_done(bist_done[3]));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tpg_model  m [ND];
  logic [AW-1:0] model_acc;

  // Normal mode: random multiply-accumulate cycles with occasional clears.
  task automatic normal_ops(int cycles);
    for (int i = 0; i < cycles; i++) begin
      a_in    = N'($urandom);
      b_in    = N'($urandom);
      mac_en  = ($urandom_range(0, 3) != 0);
      acc_clr = ($urandom_range(0, 15) == 0);
      #1;
      for (int d = 0; d < ND; d++)
        check(op_x[d] == a_in && op_y[d] == b_in && !test_mode[d], "normal-mode operands");
      @(posedge clk);
      if (acc_clr) begin
        model_acc = '0;
        n_clr++;
      end else if (mac_en) begin
        model_acc = model_acc + AW'(a_in) * AW'(b_in);
        n_mac++;
      end
      @(negedge clk);
      for (int d = 0; d < ND; d++) check(acc[d] == model_acc, "normal-mode accumulator");
    end
    mac_en  = 1'b0;
    acc_clr = 1'b0;
  endtask

  // One complete self-test on all four datapaths at once.
  task automatic self_test(output logic [AW-1:0] sig [ND]);
    logic [N-1:0] px [ND], py [ND];
    int unsigned  cyc [ND];
    logic [ND-1:0] seen;
    int unsigned  prev_k [ND];
    bit           fin;
    logic [AW-1:0] sig_ref;
    @(negedge clk);
    // Garbage on the normal-mode inputs must be ignored during the test.
    a_in = N'($urandom);
    b_in = N'($urandom);
    mac_en = 1'b1;
    acc_clr = 1'b1;
    bist_start = 1'b1;
    for (int d = 0; d < ND; d++) begin
      m[d].clear();
      cyc[d] = 0;
      seen[d] = 1'b0;
    end
    @(posedge clk);
    @(negedge clk);
    bist_start = 1'b0;
    acc_clr = 1'b0;
    check(&test_mode, "test mode entered");
    n_mode_switch++;
    // CLEAR cycle: operands cleared on the next edge.
    for (int d = 0; d < ND; d++) cyc[d] = 1;
    @(negedge clk);
    for (int d = 0; d < ND; d++) begin
      cyc[d]++;
      check(op_x[d] == 0 && op_y[d] == 0 && acc[d] == 0, "cleared at test start");
    end
    while (!(&seen)) begin
      for (int d = 0; d < ND; d++) begin
        px[d] = op_x[d];
        py[d] = op_y[d];
      end
      @(posedge clk);
      for (int d = 0; d < ND; d++) begin
        if (!seen[d]) begin
          prev_k[d] = m[d].k;
          fin = m[d].step();
          if (m[d].k != prev_k[d]) n_code_adv++;
          if (fin) n_final++;
        end
      end
      @(negedge clk);
      // Normal-mode accumulate requests are ignored while every datapath is testing.
      mac_en = &test_mode;
      for (int d = 0; d < ND; d++) begin
        if (!seen[d]) begin
          cyc[d]++;
          check(op_x[d] == m[d].x[N-1:0] && op_y[d] == m[d].y[N-1:0], "test operands");
          check($countones({op_x[d], op_y[d]} ^ {px[d], py[d]}) <= 1, "one-bit change");
          if ({op_x[d], op_y[d]} != {px[d], py[d]}) n_load_change++; else n_load_same++;
          if (bist_done[d]) begin
            seen[d] = 1'b1;
            n_done++;
            check(cyc[d] == m[d].nvec() + 2, "start-to-done cycle count");
          end
        end
      end
    end
    @(negedge clk);
    for (int d = 0; d < ND; d++) begin
      sig_ref = m[d].signature();
      sig[d] = acc[d];
      check(acc[d] == sig_ref, "signature");
      check(!test_mode[d], "back to normal mode");
      $display("datapath %0d: %0d vectors, signature %h (reference %h)", d, m[d].nvec(), acc[d], sig_ref);
    end
    n_mode_switch++;
    // The signature stays until the accumulator is used again.
    mac_en = 1'b0;
    @(negedge clk);
    for (int d = 0; d < ND; d++) check(acc[d] == sig[d], "signature held");
    model_acc = acc[0];
  endtask

  initial begin
    logic [AW-1:0] sig1 [ND], sig2 [ND];
    m[0] = new(N, 4, 4);
    m[1] = new(N, 4, 4);
    m[2] = new(N, 3, 5);
    m[3] = new(N, 3, 5);
    model_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(m[0].nvec() == 256 * N / 2, "default test set size is 256 x N/2");
    normal_ops(200);
    self_test(sig1);
    // Datapaths with the same multiplier must agree regardless of adder.
    check(sig1[0] == sig1[1] && sig1[2] == sig1[3], "adder-independent signatures");
    // Resume normal operation from a cleared accumulator.
    @(negedge clk);
    acc_clr = 1'b1;
    @(negedge clk);
    acc_clr = 1'b0;
    model_acc = '0;
    n_clr++;
    normal_ops(200);
    self_test(sig2);
    for (int d = 0; d < ND; d++) check(sig2[d] == sig1[d], "repeatable signature");
    $display("mode switches %0d, loads changing a bit %0d, loads changing none %0d, code advances %0d",
             n_mode_switch, n_load_change, n_load_same, n_code_adv);
    $display("final loads %0d, done pulses %0d, normal accumulations %0d, clears %0d",
             n_final, n_done, n_mac, n_clr);
    check(n_mode_switch > 0, "mode switch happened");
    check(n_load_change > 0, "operand bit changes happened");
    check(n_load_same > 0, "loads without change happened");
    check(n_code_adv > 0, "Gray code advances happened");
    check(n_final > 0, "final loads happened");
    check(n_done > 0, "done pulses happened");
    check(n_mac > 0, "normal accumulations happened");
    check(n_clr > 0, "accumulator clears happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
