// tb_photon_buffer: random load/clear/hold sequence against a register model.
module tb_photon_buffer;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [15:0] d = '0, q, m = '0;
  int checks = 0, failures = 0, n_load = 0, n_clr = 0, n_hold = 0;

  photon_buffer dut (.clk, .rst_n, .clr_i(clr), .en_i(en), .d_i(d), .q_o(q));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    check(q == 16'h0, "reset value");
    rst_n = 1'b1;
    repeat (500) begin
      clr = ($urandom_range(0, 15) == 0);
      en  = $urandom_range(0, 1);
      d   = 16'($urandom);
      @(posedge clk);
      if (clr) begin m = '0; n_clr++; end
      else if (en) begin m = d; n_load++; end
      else n_hold++;
      @(negedge clk);
      check(q == m, $sformatf("q %h != %h", q, m));
    end
    check(n_load > 0 && n_clr > 0 && n_hold > 0, "all operations seen");
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
