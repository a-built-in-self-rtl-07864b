// tb_output_response_analyzer: random serial stream with enable and clear
// against a serial signature model; also checks that a single flipped bit in
// a 100-bit stream changes the signature.
module tb_output_response_analyzer;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, si = 1'b0;
  logic [15:0] q, m = '0, sig_a;
  bit stream [100];
  int checks = 0, failures = 0;

  output_response_analyzer dut (.clk, .rst_n, .clr_i(clr), .en_i(en), .si_i(si), .q_o(q));
  always #5 clk = ~clk;

  function automatic logic [15:0] m_lfsr(logic [15:0] x);
    return {x[14:0], x[15] ^ x[14] ^ x[12] ^ x[3]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic feed(int flip);
    clr = 1'b1; @(negedge clk); clr = 1'b0; en = 1'b1;
    for (int i = 0; i < 100; i++) begin
      si = stream[i] ^ (i == flip);
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    repeat (800) begin
      clr = ($urandom_range(0, 63) == 0);
      en  = ($urandom_range(0, 3) != 0);
      si  = $urandom_range(0, 1);
      @(posedge clk);
      if (clr) m = '0;
      else if (en) m = m_lfsr(m) ^ {15'b0, si};
      @(negedge clk);
      check(q == m, $sformatf("q %h != %h", q, m));
    end
    clr = 1'b0;
    foreach (stream[i]) stream[i] = 1'($urandom);
    feed(-1); sig_a = q;
    for (int f = 0; f < 100; f += 7) begin
      feed(f);
      check(q != sig_a, $sformatf("single-bit error at %0d detected", f));
    end
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
