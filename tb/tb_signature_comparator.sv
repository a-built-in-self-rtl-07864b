// tb_signature_comparator: equal, unequal (including single-bit differences)
// and disabled comparisons.
module tb_signature_comparator;
  logic en;
  logic [15:0] sig, ref_w;
  logic pass, fail;
  int checks = 0, failures = 0;

  signature_comparator dut (.en_i(en), .sig_i(sig), .ref_i(ref_w), .pass_o(pass), .fail_o(fail));

  task automatic try(logic e, logic [15:0] s, logic [15:0] r);
    en = e; sig = s; ref_w = r;
    #1;
    checks++;
    if (pass != (e && s == r) || fail != (e && s != r)) begin
      failures++;
      $display("FAIL: en=%0d %h vs %h -> pass=%0d fail=%0d", e, s, r, pass, fail);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      try(1'b1, 16'hA5A5, 16'hA5A5 ^ 16'(1 << i));
      try(1'b0, 16'hA5A5, 16'hA5A5 ^ 16'(1 << i));
    end
    repeat (500) begin : rnd
      logic [15:0] v;
      v = 16'($urandom);
      try(1'($urandom), v, $urandom_range(0, 1) ? v : 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
