// tb_bilbo: exercises all four BILBO modes (scan, LFSR, D flip-flop, MISR),
// the clear and the enable, with random inputs, against a model written here.
module tb_bilbo;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, si = 1'b0, so;
  bilbo_mode_t mode = BILBO_DFF;
  logic [15:0] d = '0, q, m;
  int checks = 0, failures = 0;
  int n_mode[4] = '{0, 0, 0, 0};

  bilbo dut (.clk, .rst_n, .mode_i(mode), .clr_i(clr), .en_i(en), .d_i(d),
             .si_i(si), .q_o(q), .so_o(so));
  always #5 clk = ~clk;

  function automatic logic [15:0] m_lfsr(logic [15:0] x);
    return {x[14:0], x[15] ^ x[14] ^ x[12] ^ x[3]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    check(q == 16'h0001, "reset seed");
    m = 16'h0001;
    rst_n = 1'b1;
    repeat (2000) begin
      clr  = ($urandom_range(0, 31) == 0);
      en   = ($urandom_range(0, 7) != 0);
      mode = bilbo_mode_t'($urandom_range(0, 3));
      d    = 16'($urandom);
      si   = $urandom_range(0, 1);
      check(so == m[15], "serial out is the last stage");
      @(posedge clk);
      if (clr) m = 16'h0001;
      else if (en) begin
        n_mode[mode]++;
        case (mode)
          2'b00: m = {m[14:0], si};
          2'b01: m = m_lfsr(m);
          2'b10: m = d;
          2'b11: m = m_lfsr(m) ^ d;
        endcase
      end
      @(negedge clk);
      check(q == m, $sformatf("mode %0d: q %h != %h", mode, q, m));
    end
    for (int k = 0; k < 4; k++) check(n_mode[k] > 0, "every mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
