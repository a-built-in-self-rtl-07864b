// tb_test_pattern_generator: checks the seed after clear, one LFSR step per
// enabled cycle, hold when disabled, and that the sequence does not repeat
// within 65535 steps (maximal length).
module tb_test_pattern_generator;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [15:0] q, m;
  int checks = 0, failures = 0;

  test_pattern_generator dut (.clk, .rst_n, .clr_i(clr), .en_i(en), .q_o(q));
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
    check(q == 16'hACE1, "reset seed");
    rst_n = 1'b1;
    en = 1'b1;
    m = 16'hACE1;
    for (int i = 1; i < 65535; i++) begin
      @(negedge clk);
      m = m_lfsr(m);
      if (i < 500) check(q == m, $sformatf("step %0d: %h != %h", i, q, m));
      else if (q == 16'hACE1) check(0, "period shorter than 65535");
    end
    @(negedge clk);
    check(q == 16'hACE1, "period is 65535");
    en = 1'b0;
    m = q;
    repeat (5) begin @(negedge clk); check(q == m, "hold when disabled"); end
    en = 1'b1; @(negedge clk); @(negedge clk);
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(q == 16'hACE1, "clear loads the seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
