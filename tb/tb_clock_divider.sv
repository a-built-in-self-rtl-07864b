// tb_clock_divider: checks that the divide-by-8 and divide-by-16 strobes and
// square waves occur at the right cycles, against a counter kept here.
module tb_clock_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] count;
  logic tick8, tick16, div8, div16;
  int checks = 0, failures = 0;
  int n8 = 0, n16 = 0, last8 = -1, last16 = -1;

  clock_divider dut (.clk, .rst_n, .count_o(count), .tick8_o(tick8),
                     .tick16_o(tick16), .div8_o(div8), .div16_o(div16));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 200; c++) begin
      check(count == 4'(c % 16), "count");
      check(tick8 == ((c % 8) == 7), "tick8");
      check(tick16 == ((c % 16) == 15), "tick16");
      check(div8 == (((c / 4) % 2) == 1), "div8 square wave");
      check(div16 == (((c / 8) % 2) == 1), "div16 square wave");
      if (tick8) begin
        if (last8 >= 0) check(c - last8 == 8, "tick8 period");
        last8 = c; n8++;
      end
      if (tick16) begin
        if (last16 >= 0) check(c - last16 == 16, "tick16 period");
        last16 = c; n16++;
      end
      @(negedge clk);
    end
    check(n8 == 25 && n16 == 12, "strobe counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
