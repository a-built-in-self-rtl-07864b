// tb_bist_idaq_top: end-to-end test of the BIST photon counter at its default
// parameters.
//
// A cycle model written here from the specification (its own LFSR, a plain "+"
// adder, its own decimal conversion) predicts the count, the PISO serial
// stream, the display and the three test signatures. The test runs:
//   1. normal counting with the divide-by-16 strobe, then the divide-by-8 one,
//      with large samples so the 16-bit total wraps (carry);
//   2. INT into test mode, START, and the full CUT-1/2/3 self test, checking
//      the verdicts, the cycle at which each is registered and the display;
//   3. a 32-bit scan of the two BILBO signatures;
//   4. RESET back to normal mode and more counting;
//   5. stuck-at faults forced on the buffer output and on the adder sum,
//      which must fail CUT-1 and CUT-2 respectively and stop the sequence.
// Each mechanism is counted and a failure is counted for one that never occurs.
module tb_bist_idaq_top;
  import bist_pkg::*;

  localparam int L1 = CUT1_CYCLES_DEFAULT;
  localparam int L2 = CUT2_CYCLES_DEFAULT;
  localparam int W3 = CUT3_WORDS_DEFAULT;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t n_i = '0;
  logic clk_sel = 1'b0, int_i = 1'b0, start_i = 1'b0, mode_reset = 1'b0;
  logic scan_en = 1'b0, scan_in = 1'b0;
  logic scan_out, serial, carry, test_mode, busy, pass, fail;
  logic [2:0] dpass, dfail;
  logic [3:0] digit [6];
  logic [6:0] hex_n [6];
  logic [9:0] ledr;
  word_t count;

  bist_idaq_top dut (
    .clk, .rst_n, .n_i, .clk_sel_i(clk_sel), .int_i, .start_i,
    .mode_reset_i(mode_reset), .scan_en_i(scan_en), .scan_in_i(scan_in),
    .scan_out_o(scan_out), .serial_o(serial), .count_o(count), .carry_o(carry),
    .test_mode_o(test_mode), .busy_o(busy), .pass_o(pass), .fail_o(fail),
    .display_pass_o(dpass), .display_fail_o(dfail),
    .digit_o(digit), .hex_n_o(hex_n), .ledr_o(ledr)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic logic [15:0] m_lfsr(logic [15:0] x);
    logic fb;
    fb = x[15] ^ x[14] ^ x[12] ^ x[3];
    return {x[14:0], fb};
  endfunction

  logic [3:0]  m_div = 0;
  logic [15:0] m_buf = 0, m_acc = 0, m_piso = 0;
  logic        m_active = 1'b0;   // model tracks normal-mode counting
  int n_samples = 0, n_div8 = 0, n_div16 = 0, n_wrap = 0, n_serial_words = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (m_active && !test_mode) begin : normal_step
        logic t16, t8, smp;
        logic [16:0] s;
        logic [15:0] old_acc;
        old_acc = m_acc;
        t16 = (m_div == 4'hF);
        t8  = (m_div[2:0] == 3'h7);
        smp = clk_sel ? t8 : t16;
        s = {1'b0, m_acc} + {1'b0, m_buf};
        if (smp) begin
          n_samples++;
          if (clk_sel) n_div8++; else n_div16++;
          if (s[16]) n_wrap++;
          m_acc = s[15:0];
          m_buf = n_i;
        end
        if (t16) begin
          m_piso = old_acc;
          n_serial_words++;
        end else m_piso = {m_piso[14:0], 1'b0};
      end
      m_div = m_div + 1;
    end
  end

  // Normal-mode output checks on the falling edge.
  int n_disp_checks = 0;
  always @(negedge clk) begin
    if (rst_n && m_active && !test_mode) begin
      check(count == m_acc, $sformatf("count %h != model %h", count, m_acc));
      check(serial == m_piso[15], "serial output");
      check(carry == (({1'b0, m_acc} + {1'b0, m_buf}) >> 16), "carry");
      for (int d = 0; d < 5; d++)
        check(digit[d] == 4'((m_acc / (10 ** d)) % 10), $sformatf("digit %0d", d));
      check(digit[5] == 0, "digit 5");
      check(ledr == {1'b0, dpass[2], 2'b0, dpass[1], 3'b0, dpass[0], 1'b0},
            "pass LEDs in normal mode");
      n_disp_checks++;
    end
  end

  // Expected signatures and final states of the self test.
  logic [15:0] e_sig1, e_sig2, e_sig3, e_b1, e_b2, e_buf, e_acc, e_piso;
  task automatic model_selftest();
    logic [15:0] tpg, bf, b1, b2, acc, piso, ora, nb;
    logic so;
    tpg = 16'hACE1; bf = 0; b1 = 16'h0001;
    repeat (L1) begin
      nb = m_lfsr(b1) ^ bf; bf = tpg; tpg = m_lfsr(tpg); b1 = nb;
    end
    e_sig1 = b1; e_buf = bf;
    b1 = 16'h0001; acc = 0; b2 = 16'h0001;
    repeat (L2) begin
      nb = m_lfsr(b2) ^ acc; acc = acc + b1; b1 = m_lfsr(b1); b2 = nb;
    end
    e_sig2 = b2; e_acc = acc; e_b1 = b1;
    b2 = 16'h0001; piso = 0; ora = 0;
    for (int t = 0; t < 16 * W3 + 1; t++) begin
      so = piso[15];
      nb = m_lfsr(ora) ^ {15'b0, so};
      if (t % 16 == 0) begin piso = b2; b2 = m_lfsr(b2); end
      else piso = {piso[14:0], 1'b0};
      ora = nb;
    end
    e_sig3 = ora; e_piso = piso; e_b2 = b2;
  endtask

  // ---------------- stimulus helpers ----------------
  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic count_normal(int n, bit sel, logic [15:0] lo, logic [15:0] span);
    clk_sel = sel;
    repeat (n) begin
      n_i = lo + 16'($urandom_range(0, int'(span)));
      tick();
    end
  endtask

  int n_pass[3] = '{0, 0, 0};
  int n_fail[3] = '{0, 0, 0};
  int n_test_disp[3] = '{0, 0, 0};
  int n_int = 0, n_reset = 0, n_scan = 0, n_blocked = 0;

  // Runs START and waits for the sequence to end. Returns the cycle offsets
  // (from the edge that samples START) at which each result bit appeared.
  task automatic run_selftest(output int at_pass[3], output int at_fail[3]);
    longint unsigned s;
    for (int k = 0; k < 3; k++) begin at_pass[k] = -1; at_fail[k] = -1; end
    start_i = 1'b1;
    tick(); s = cyc; start_i = 1'b0;
    check(busy, "busy after START");
    while (busy) begin
      for (int k = 0; k < 3; k++) begin
        if (dut.u_cu.cut_q == cut_t'(k)) begin
          for (int d = 0; d < 6; d++)
            check(digit[d] == ((d == k + 1) ? 4'd2 : 4'd0), "test digit pattern");
          n_test_disp[k]++;
        end
      end
      tick();
      for (int k = 0; k < 3; k++) begin
        if (dpass[k] && at_pass[k] < 0) at_pass[k] = int'(cyc - s);
        if (dfail[k] && at_fail[k] < 0) at_fail[k] = int'(cyc - s);
      end
    end
  endtask

  int ap[3], af[3];
  logic [31:0] scan_bits;

  initial begin
    model_selftest();
    $display("model signatures: CUT1 %h CUT2 %h CUT3 %h", e_sig1, e_sig2, e_sig3);
    tick(3);
    rst_n = 1'b1;
    m_active = 1'b1;

    // 1. normal counting
    count_normal(200, 1'b0, 16'd0, 16'd300);
    count_normal(300, 1'b1, 16'hE000, 16'h1FFF);
    count_normal(100, 1'b0, 16'd0, 16'd50);

    // 2. into test mode and the full self test
    int_i = 1'b1; tick(); int_i = 1'b0;
    check(test_mode, "INT enters test mode"); n_int++;
    tick(5);
    check(!busy && test_mode, "waits for START");
    check(digit[0] == 0 && digit[1] == 0 && digit[2] == 0 && digit[3] == 0,
          "blank test display before a test");
    run_selftest(ap, af);
    check(dpass == 3'b111 && dfail == 3'b000, "all three CUTs pass");
    check(ap[0] == L1 + 2, $sformatf("CUT-1 result at %0d", ap[0]));
    check(ap[1] == L1 + L2 + 4, $sformatf("CUT-2 result at %0d", ap[1]));
    check(ap[2] == L1 + L2 + 16 * W3 + 7, $sformatf("CUT-3 result at %0d", ap[2]));
    check(dut.u_dpu.sig3_o == e_sig3, "ORA signature vs model");
    check(SIG_CUT1_DEFAULT == e_sig1 && SIG_CUT2_DEFAULT == e_sig2 &&
          SIG_CUT3_DEFAULT == e_sig3, "ROM contents are the fault-free signatures");
    for (int k = 0; k < 3; k++) if (ap[k] >= 0) n_pass[k]++;
    check(ledr == 10'b01_0010_0010, "pass LEDs 1, 5, 8");
    check(digit[3] == 2 && digit[2] == 0 && digit[1] == 0 && digit[0] == 0,
          "display 2000 after CUT-3");

    // 3. scan the BILBO chain: BILBO-2 then BILBO-1, MSB first
    scan_en = 1'b1; scan_in = 1'b0;
    for (int i = 31; i >= 0; i--) begin
      scan_bits[i] = scan_out;
      tick();
    end
    scan_en = 1'b0;
    check(scan_bits == {e_b2, e_b1}, $sformatf("scan %h != %h", scan_bits, {e_b2, e_b1}));
    n_scan++;

    // 4. back to normal mode; the model continues from the test's final state
    m_buf = e_buf; m_acc = e_acc; m_piso = e_piso;
    mode_reset = 1'b1; tick(); mode_reset = 1'b0;
    check(!test_mode, "RESET returns to normal mode"); n_reset++;
    count_normal(200, 1'b0, 16'd0, 16'd1000);

    // 5. injected stuck-at faults
    m_active = 1'b0;
    int_i = 1'b1; tick(); int_i = 1'b0;
    n_int++;
    force dut.u_dpu.n1[5] = 1'b1;
    run_selftest(ap, af);
    release dut.u_dpu.n1[5];
    check(dfail == 3'b001 && dpass == 3'b000, "buffer fault fails CUT-1 only");
    check(af[0] == L1 + 2, "CUT-1 fail timing");
    if (af[0] >= 0) n_fail[0]++;
    if (dpass[1] == 0 && dpass[2] == 0) n_blocked++;
    tick(3);
    check(test_mode && !busy, "waits for START after a failure");

    force dut.u_dpu.u_cut2.sum[9] = 1'b0;
    run_selftest(ap, af);
    release dut.u_dpu.u_cut2.sum[9];
    check(dfail == 3'b010 && dpass == 3'b001, "adder fault fails CUT-2 after CUT-1 passes");
    check(ledr == 10'b00_0000_0010, "only LEDR 1 after CUT-1 passed");
    if (af[1] >= 0) n_fail[1]++;
    if (dpass[2] == 0) n_blocked++;

    force dut.u_dpu.u_cut3.q_q[12] = 1'b0;
    run_selftest(ap, af);
    release dut.u_dpu.u_cut3.q_q[12];
    check(dfail == 3'b100 && dpass == 3'b011, "PISO fault fails CUT-3");
    check(ledr == 10'b00_0010_0010, "LEDR 1 and 5 after CUT-1 and CUT-2 passed");
    if (af[2] >= 0) n_fail[2]++;

    // mechanism coverage
    $display("samples=%0d div16=%0d div8=%0d wraps=%0d words=%0d int=%0d reset=%0d scan=%0d",
             n_samples, n_div16, n_div8, n_wrap, n_serial_words, n_int, n_reset, n_scan);
    $display("pass=%0d/%0d/%0d fail=%0d/%0d/%0d blocked=%0d",
             n_pass[0], n_pass[1], n_pass[2], n_fail[0], n_fail[1], n_fail[2], n_blocked);
    check(n_div16 > 0, "div-16 sampling happened");
    check(n_div8 > 0, "div-8 sampling happened");
    check(n_wrap > 0, "accumulator wrap happened");
    check(n_serial_words > 0, "PISO words happened");
    check(n_int > 0 && n_reset > 0 && n_scan > 0, "mode switches and scan happened");
    for (int k = 0; k < 3; k++) begin
      check(n_pass[k] > 0, $sformatf("CUT-%0d pass happened", k + 1));
      check(n_fail[k] > 0, $sformatf("CUT-%0d fail happened", k + 1));
    end
    check(n_blocked > 0, "a failure stopped the sequence");
    check(n_disp_checks > 0, "display checked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
