// tb_status_display: decimal digits and segment codes of random counts in
// normal mode, the 0020 / 0200 / 2000 test patterns and the pass LEDs.
module tb_status_display;
  import bist_pkg::*;
  logic test_mode, cut_valid;
  cut_t cut;
  logic [2:0] pass;
  logic [15:0] count;
  logic [3:0] digit [6];
  logic [6:0] hex_n [6];
  logic [9:0] ledr;
  int checks = 0, failures = 0;

  // Segment patterns g..a, active low, for 0..9.
  localparam logic [6:0] SEG [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                      7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  status_display dut (.test_mode_i(test_mode), .cut_i(cut), .cut_valid_i(cut_valid),
                      .pass_i(pass), .count_i(count), .digit_o(digit),
                      .hex_n_o(hex_n), .ledr_o(ledr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_digits(int v, string what);
    for (int d = 0; d < 6; d++) begin
      check(digit[d] == 4'((v / (10 ** d)) % 10), $sformatf("%s digit %0d", what, d));
      check(hex_n[d] == SEG[(v / (10 ** d)) % 10], $sformatf("%s segments %0d", what, d));
    end
  endtask

  initial begin
    test_mode = 1'b0; cut = CUT_1; cut_valid = 1'b0; pass = '0;
    foreach (SEG[v]) begin count = 16'(v); #1 check_digits(v, "single digit"); end
    count = 16'd145; #1 check_digits(145, "145");
    count = 16'hFFFF; #1 check_digits(65535, "max");
    repeat (300) begin
      count = 16'($urandom);
      pass = 3'($urandom);
      #1 check_digits(int'(count), "random");
      check(ledr == {1'b0, pass[2], 2'b0, pass[1], 3'b0, pass[0], 1'b0}, "LEDs");
    end
    test_mode = 1'b1;
    #1 check_digits(0, "test mode before a test");
    cut_valid = 1'b1;
    cut = CUT_1; #1 check_digits(20, "CUT-1");
    cut = CUT_2; #1 check_digits(200, "CUT-2");
    cut = CUT_3; #1 check_digits(2000, "CUT-3");
    pass = 3'b111; #1 check(ledr == 10'b01_0010_0010, "LEDR 1, 5, 8");
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
