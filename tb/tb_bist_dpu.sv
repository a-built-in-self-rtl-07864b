// tb_bist_dpu: drives the datapath's command bundle directly. It checks
// normal-mode counting (count and serial output) against a model, then plays
// the three CUT tests with the default lengths and expects the comparator to
// pass each against the default ROM, a shortened CUT-1 run to fail, and the
// BILBO scan chain to shift BILBO-2 then BILBO-1 out.
module tb_bist_dpu;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clk_sel = 1'b0, scan_in = 1'b0;
  dpu_ctrl_t c;
  word_t n_i = '0, count, s1, s2, s3;
  logic serial, carry, scan_out, pass, fail;
  int checks = 0, failures = 0, n_samples = 0;

  bist_dpu dut (.clk, .rst_n, .ctrl_i(c), .clk_sel_i(clk_sel), .n_i, .scan_in_i(scan_in),
                .serial_o(serial), .count_o(count), .carry_o(carry), .scan_out_o(scan_out),
                .sig1_o(s1), .sig2_o(s2), .sig3_o(s3), .pass_o(pass), .fail_o(fail));
  always #5 clk = ~clk;

  function automatic logic [15:0] m_lfsr(logic [15:0] x);
    return {x[14:0], x[15] ^ x[14] ^ x[12] ^ x[3]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic dpu_ctrl_t idle_test();
    dpu_ctrl_t x = '0;
    x.test_sel1 = 1; x.test_sel2 = 1; x.test_sel3 = 1;
    x.b1_mode = BILBO_DFF; x.b2_mode = BILBO_DFF;
    return x;
  endfunction

  // One CUT test: clear, run for len cycles, compare. Returns the verdict.
  task automatic play(int k, int len, output bit passed);
    c = idle_test(); c.sig_sel = cut_t'(k);
    case (k)
      0: begin c.tpg_clr = 1; c.buf_clr = 1; c.b1_clr = 1; end
      1: begin c.b1_clr = 1; c.acc_clr = 1; c.b2_clr = 1; end
      default: begin c.b2_clr = 1; c.piso_clr = 1; c.ora_clr = 1; end
    endcase
    @(negedge clk);
    for (int t = 0; t < len; t++) begin
      c = idle_test(); c.sig_sel = cut_t'(k);
      case (k)
        0: begin c.tpg_en = 1; c.buf_en = 1; c.b1_mode = BILBO_MISR; c.b1_en = 1; end
        1: begin c.b1_mode = BILBO_LFSR; c.b1_en = 1; c.acc_en = 1;
                 c.b2_mode = BILBO_MISR; c.b2_en = 1; end
        default: begin
          c.piso_load = (t % 16 == 0); c.piso_shift = (t % 16 != 0);
          c.b2_mode = BILBO_LFSR; c.b2_en = (t % 16 == 0); c.ora_en = 1;
        end
      endcase
      @(negedge clk);
    end
    c = idle_test(); c.sig_sel = cut_t'(k); c.cmp_en = 1;
    #1 check(pass ^ fail, "exactly one verdict");
    passed = pass;
    @(negedge clk);
    c = idle_test();
    #1 check(!pass && !fail, "no verdict without compare enable");
  endtask

  logic [3:0]  m_div = 0;
  logic [15:0] m_buf = 0, m_acc = 0, m_piso = 0;

  initial begin
    bit ok;
    logic [31:0] bits;
    c = '0; c.normal = 1; c.b1_mode = BILBO_DFF; c.b2_mode = BILBO_DFF;
    @(negedge clk);
    rst_n = 1;
    // normal mode, model updated per rising edge
    for (int i = 0; i < 400; i++) begin
      logic t16, smp;
      logic [15:0] old_acc;
      if (i == 200) clk_sel = 1;
      n_i = 16'($urandom_range(0, 5000));
      @(posedge clk);
      t16 = (m_div == 15);
      smp = clk_sel ? (m_div[2:0] == 7) : t16;
      old_acc = m_acc;
      if (smp) begin m_acc = m_acc + m_buf; m_buf = n_i; n_samples++; end
      m_piso = t16 ? old_acc : {m_piso[14:0], 1'b0};
      m_div++;
      @(negedge clk);
      check(count == m_acc, $sformatf("count %h != %h", count, m_acc));
      check(serial == m_piso[15], "serial output");
    end
    check(n_samples == 12 + 25, "number of samples");
    // test mode
    c = idle_test(); n_i = 16'hFFFF;
    @(negedge clk);
    play(0, CUT1_CYCLES_DEFAULT, ok);  check(ok, "CUT-1 passes");
    play(1, CUT2_CYCLES_DEFAULT, ok);  check(ok, "CUT-2 passes");
    play(2, 16 * CUT3_WORDS_DEFAULT + 1, ok); check(ok, "CUT-3 passes");
    check(s3 == SIG_CUT3_DEFAULT, "ORA holds its signature");
    play(0, CUT1_CYCLES_DEFAULT - 1, ok); check(!ok, "short CUT-1 run fails");
    // scan out: BILBO-2 then BILBO-1, MSB first, and check the shifted-in bits
    c = idle_test(); c.b1_mode = BILBO_SCAN; c.b2_mode = BILBO_SCAN; c.b1_en = 1; c.b2_en = 1;
    #1;
    for (int i = 31; i >= 0; i--) begin
      bits[i] = scan_out;
      scan_in = i[0];
      @(negedge clk);
    end
    check(bits == {s2_before, s1_before}, $sformatf("scan %h", bits));
    check(s1 == 16'hAAAA && s2 == 16'hAAAA, "scanned-in pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Signatures just before the scan starts.
  word_t s1_before, s2_before;
  always @(negedge clk) if (c.b1_mode != BILBO_SCAN) begin s1_before = s1; s2_before = s2; end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
