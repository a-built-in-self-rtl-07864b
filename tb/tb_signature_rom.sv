// tb_signature_rom: reads every address of a ROM with test contents and of
// the default ROM.
module tb_signature_rom;
  import bist_pkg::*;
  cut_t addr;
  logic [15:0] data, data_def;
  int checks = 0, failures = 0;

  signature_rom #(.SIG_CUT1(16'h1234), .SIG_CUT2(16'hBEEF), .SIG_CUT3(16'h0F0F))
    dut (.addr_i(addr), .data_o(data));
  signature_rom dut_def (.addr_i(addr), .data_o(data_def));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    addr = CUT_1; #1 check(data == 16'h1234 && data_def == 16'h2E4D, "address 0");
    addr = CUT_2; #1 check(data == 16'hBEEF && data_def == 16'h9302, "address 1");
    addr = CUT_3; #1 check(data == 16'h0F0F && data_def == 16'h8302, "address 2");
    addr = CUT_NONE; #1 check(data == 16'h0000 && data_def == 16'h0000, "address 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
