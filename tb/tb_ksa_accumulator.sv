// tb_ksa_accumulator: random accumulate/clear/hold sequence against a model,
// with large inputs so that the 16-bit total wraps; checks the carry out.
module tb_ksa_accumulator;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, carry;
  logic [15:0] din = '0, acc, m = '0;
  int checks = 0, failures = 0, n_wrap = 0, n_add = 0;

  ksa_accumulator dut (.clk, .rst_n, .clr_i(clr), .en_i(en), .din_i(din),
                       .acc_o(acc), .carry_o(carry));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    repeat (1000) begin
      logic [16:0] s;
      clr = ($urandom_range(0, 63) == 0);
      en  = ($urandom_range(0, 3) != 0);
      din = 16'($urandom_range(0, 3) == 0 ? $urandom : $urandom_range(0, 200));
      s = {1'b0, m} + {1'b0, din};
      #1 check(carry == s[16], "carry out");
      @(posedge clk);
      if (clr) m = '0;
      else if (en) begin m = s[15:0]; n_add++; if (s[16]) n_wrap++; end
      @(negedge clk);
      check(acc == m, $sformatf("acc %h != %h", acc, m));
    end
    check(n_wrap > 0 && n_add > 0, "wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
