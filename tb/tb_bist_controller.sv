// tb_bist_controller: drives the controller with a comparator stand-in whose
// verdict per CUT is chosen by the test, and checks every command of the
// clear / run / compare schedule cycle by cycle, the test order, stopping on a
// failure, the result flags, the scan hook and the mode switches.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int L1 = 5, L2 = 7, W3 = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic int_i = 0, start_i = 0, mode_reset = 0, scan_en = 0, pass, fail;
  dpu_ctrl_t ctrl;
  logic test_mode, busy, cut_valid;
  cut_t cut;
  logic [2:0] dpass, dfail;
  bit verdict [3] = '{1, 1, 1};
  int checks = 0, failures = 0;

  bist_controller #(.CUT1_CYCLES(L1), .CUT2_CYCLES(L2), .CUT3_WORDS(W3)) dut (
    .clk, .rst_n, .int_i, .start_i, .mode_reset_i(mode_reset), .scan_en_i(scan_en),
    .pass_i(pass), .fail_i(fail), .ctrl_o(ctrl), .test_mode_o(test_mode),
    .busy_o(busy), .cut_o(cut), .cut_valid_o(cut_valid),
    .display_pass_o(dpass), .display_fail_o(dfail));

  assign pass = ctrl.cmp_en &&  verdict[ctrl.sig_sel];
  assign fail = ctrl.cmp_en && !verdict[ctrl.sig_sel];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Expected command word for one cycle of the schedule.
  function automatic dpu_ctrl_t expect_cmd(int k, int phase, int t);
    dpu_ctrl_t c = '0;
    c.test_sel1 = 1; c.test_sel2 = 1; c.test_sel3 = 1;
    c.b1_mode = BILBO_DFF; c.b2_mode = BILBO_DFF;
    c.sig_sel = cut_t'(k);
    if (phase == 0) begin
      if (k == 0) begin c.tpg_clr = 1; c.buf_clr = 1; c.b1_clr = 1; end
      if (k == 1) begin c.b1_clr = 1; c.acc_clr = 1; c.b2_clr = 1; end
      if (k == 2) begin c.b2_clr = 1; c.piso_clr = 1; c.ora_clr = 1; end
    end else if (phase == 1) begin
      if (k == 0) begin
        c.tpg_en = 1; c.buf_en = 1; c.b1_mode = BILBO_MISR; c.b1_en = 1;
      end
      if (k == 1) begin
        c.b1_mode = BILBO_LFSR; c.b1_en = 1; c.acc_en = 1;
        c.b2_mode = BILBO_MISR; c.b2_en = 1;
      end
      if (k == 2) begin
        c.piso_load = (t % 16 == 0); c.piso_shift = (t % 16 != 0);
        c.b2_mode = BILBO_LFSR; c.b2_en = (t % 16 == 0); c.ora_en = 1;
      end
    end else c.cmp_en = 1;
    return c;
  endfunction

  // Runs START and follows the schedule; returns after the sequence ends.
  task automatic run_and_check(int expect_last);
    int len [3] = '{L1, L2, 16 * W3 + 1};
    start_i = 1; @(negedge clk); start_i = 0;
    for (int k = 0; k <= expect_last; k++) begin
      check(busy && cut == cut_t'(k) && cut_valid, "CUT under test");
      check(ctrl == expect_cmd(k, 0, 0), $sformatf("CUT-%0d clear cycle", k + 1));
      @(negedge clk);
      for (int t = 0; t < len[k]; t++) begin
        check(ctrl == expect_cmd(k, 1, t), $sformatf("CUT-%0d run cycle %0d", k + 1, t));
        @(negedge clk);
      end
      check(ctrl == expect_cmd(k, 2, 0), $sformatf("CUT-%0d compare cycle", k + 1));
      @(negedge clk);
      if (k < expect_last) check(dpass[k], "pass flag set before the next CUT");
    end
    check(!busy && test_mode, "back in test mode, waiting");
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    check(!test_mode && ctrl.normal && !ctrl.test_sel1 && ctrl.b1_mode == BILBO_DFF,
          "normal mode after reset");
    start_i = 1; @(negedge clk); start_i = 0;
    check(!test_mode && !busy, "START ignored in normal mode");
    int_i = 1; @(negedge clk); int_i = 0;
    check(test_mode && !busy && !ctrl.normal && ctrl.test_sel1 && ctrl.test_sel2 &&
          ctrl.test_sel3, "INT enters test mode");
    check(!cut_valid, "no CUT tested yet");
    repeat (3) @(negedge clk);
    check(test_mode && !busy, "idle in test mode");
    // all pass
    run_and_check(2);
    check(dpass == 3'b111 && dfail == 3'b000, "all passed");
    // scan hook
    scan_en = 1; @(negedge clk);
    check(ctrl.b1_mode == BILBO_SCAN && ctrl.b2_mode == BILBO_SCAN && ctrl.b1_en &&
          ctrl.b2_en, "scan mode while idle");
    scan_en = 0; @(negedge clk);
    check(!ctrl.b1_en && !ctrl.b2_en, "BILBOs hold while idle");
    // CUT-2 fails: CUT-3 must not be tested
    verdict = '{1, 0, 1};
    run_and_check(1);
    check(dpass == 3'b001 && dfail == 3'b010, "CUT-2 failure stops the sequence");
    repeat (4) begin
      @(negedge clk);
      check(!busy && !ctrl.cmp_en && !ctrl.b1_en && test_mode, "stays idle after a failure");
    end
    // CUT-1 fails
    verdict = '{0, 1, 1};
    run_and_check(0);
    check(dpass == 3'b000 && dfail == 3'b001, "CUT-1 failure stops the sequence");
    // retry passes
    verdict = '{1, 1, 1};
    run_and_check(2);
    check(dpass == 3'b111 && dfail == 3'b000, "retry passes, flags cleared by START");
    // RESET back to normal, and RESET has priority over START
    mode_reset = 1; start_i = 1; @(negedge clk); mode_reset = 0; start_i = 0;
    check(!test_mode && ctrl.normal && !busy, "RESET returns to normal mode");
    check(dpass == 3'b111, "pass flags kept for display");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
