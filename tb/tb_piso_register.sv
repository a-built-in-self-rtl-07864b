// tb_piso_register: loads words and checks they leave MSB first, one bit per
// shift cycle, plus random load/shift/hold/clear against a model.
module tb_piso_register;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0, shift = 1'b0, so;
  logic [15:0] d = '0, m = '0, got;
  int checks = 0, failures = 0;

  piso_register dut (.clk, .rst_n, .clr_i(clr), .load_i(load), .shift_i(shift),
                     .d_i(d), .so_o(so));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    // whole words
    repeat (20) begin
      d = 16'($urandom); load = 1'b1; shift = 1'b0;
      @(negedge clk);
      load = 1'b0; shift = 1'b1;
      for (int i = 15; i >= 0; i--) begin
        got[i] = so;
        @(negedge clk);
      end
      check(got == d, $sformatf("word %h came out as %h", d, got));
      check(so == 1'b0, "zero fill after 16 shifts");
    end
    // random control
    m = '0;
    load = 1'b1; d = '0; @(negedge clk);
    repeat (500) begin
      clr = ($urandom_range(0, 31) == 0);
      load = ($urandom_range(0, 7) == 0);
      shift = $urandom_range(0, 1);
      d = 16'($urandom);
      @(posedge clk);
      if (clr) m = '0;
      else if (load) m = d;
      else if (shift) m = {m[14:0], 1'b0};
      @(negedge clk);
      check(so == m[15], "serial out vs model");
    end
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
