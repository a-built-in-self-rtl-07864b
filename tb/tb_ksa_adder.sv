// tb_ksa_adder: the Kogge-Stone adder against "+", on corner cases (all
// carries rippling, all ones, zero) and random operands, with both carry-ins.
module tb_ksa_adder;
  logic [15:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  ksa_adder #(.W(16)) dut (.a_i(a), .b_i(b), .cin_i(cin), .sum_o(sum), .cout_o(cout));

  task automatic try(logic [15:0] x, logic [15:0] y, logic c);
    logic [16:0] e;
    a = x; b = y; cin = c;
    #1;
    e = {1'b0, x} + {1'b0, y} + 17'(c);
    checks++;
    if ({cout, sum} != e) begin
      failures++;
      $display("FAIL: %h + %h + %0d = %h, expected %h", x, y, c, {cout, sum}, e);
    end
  endtask

  initial begin
    try(16'h0000, 16'h0000, 1'b0);
    try(16'hFFFF, 16'h0001, 1'b0);
    try(16'hFFFF, 16'h0000, 1'b1);
    try(16'hFFFF, 16'hFFFF, 1'b1);
    try(16'h8000, 16'h8000, 1'b0);
    try(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 16; i++) begin
      try(16'(1 << i), 16'(1 << i), 1'b0);
      try(16'hFFFF >> i, 16'h0001, 1'b0);
    end
    repeat (20000) try(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
