// tb_fault_coverage: stuck-at fault coverage of the self test.
//
// For every bit of five nets inside the circuits under test
//   buffer output (CUT-1), adder sum, adder carries, accumulator register
//   (CUT-2) and PISO register (CUT-3)
// it resets the design, forces the bit to 0 or to 1, runs the self test and
// records which CUT the controller reports as failing. 5 x 16 x 2 = 160
// faults. A detected fault must be reported against the CUT that holds it,
// with the earlier CUTs passed; the test checks that the fault-free circuit
// passes before and after, and that coverage is at least 90 %.
module tb_fault_coverage;
  import bist_pkg::*;

  localparam int NSITES = 5;
  localparam int SITE_CUT [NSITES] = '{0, 1, 1, 1, 2};

  logic clk = 1'b0, rst_n = 1'b0;
  logic int_i = 1'b0, start_i = 1'b0;
  logic scan_out, serial, carry, test_mode, busy, pass, fail;
  logic [2:0] dpass, dfail;
  logic [3:0] digit [6];
  logic [6:0] hex_n [6];
  logic [9:0] ledr;
  word_t count;

  bist_idaq_top dut (
    .clk, .rst_n, .n_i(16'h0), .clk_sel_i(1'b0), .int_i, .start_i,
    .mode_reset_i(1'b0), .scan_en_i(1'b0), .scan_in_i(1'b0),
    .scan_out_o(scan_out), .serial_o(serial), .count_o(count), .carry_o(carry),
    .test_mode_o(test_mode), .busy_o(busy), .pass_o(pass), .fail_o(fail),
    .display_pass_o(dpass), .display_fail_o(dfail),
    .digit_o(digit), .hex_n_o(hex_n), .ledr_o(ledr)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int  site = 0, bitn = 0;
  logic sa = 1'b0;
  logic apply = 1'b0, remove = 1'b0;

  for (genvar i = 0; i < 16; i++) begin : g_site
    always @(posedge apply) begin
      if (bitn == i) begin
        case (site)
          0: force dut.u_dpu.n1[i] = sa;
          1: force dut.u_dpu.u_cut2.sum[i] = sa;
          2: force dut.u_dpu.u_cut2.u_ksa.carry[i+1] = sa;
          3: force dut.u_dpu.u_cut2.acc_q[i] = sa;
          default: force dut.u_dpu.u_cut3.q_q[i] = sa;
        endcase
      end
    end
    always @(posedge remove) begin
      release dut.u_dpu.n1[i];
      release dut.u_dpu.u_cut2.sum[i];
      release dut.u_dpu.u_cut2.u_ksa.carry[i+1];
      release dut.u_dpu.u_cut2.acc_q[i];
      release dut.u_dpu.u_cut3.q_q[i];
    end
  end

  // Reset, enter test mode, optionally insert the fault, run the self test.
  task automatic run(bit with_fault);
    rst_n = 1'b0; repeat (2) @(negedge clk); rst_n = 1'b1;
    int_i = 1'b1; @(negedge clk); int_i = 1'b0;
    if (with_fault) begin apply = 1'b1; #1 apply = 1'b0; end
    start_i = 1'b1; @(negedge clk); start_i = 1'b0;
    while (busy) @(negedge clk);
    if (with_fault) begin remove = 1'b1; #1 remove = 1'b0; end
  endtask

  int detected = 0, total = 0;
  int det_site [NSITES] = '{0, 0, 0, 0, 0};

  initial begin
    run(1'b0);
    check(dpass == 3'b111 && dfail == 3'b000, "fault-free circuit passes");
    for (int s = 0; s < NSITES; s++) begin
      for (int b = 0; b < 16; b++) begin
        for (int v = 0; v < 2; v++) begin
          site = s; bitn = b; sa = 1'(v);
          run(1'b1);
          total++;
          if (dfail != 3'b000) begin
            detected++;
            det_site[s]++;
            check(dfail == 3'(1 << SITE_CUT[s]) && dpass == 3'((1 << SITE_CUT[s]) - 1),
                  $sformatf("site %0d bit %0d stuck-at-%0d reported against CUT-%0d",
                            s, b, v, SITE_CUT[s] + 1));
          end else begin
            $display("undetected: site %0d bit %0d stuck-at-%0d", s, b, v);
          end
        end
      end
    end
    run(1'b0);
    check(dpass == 3'b111 && dfail == 3'b000, "fault-free circuit passes after release");
    $display("coverage: %0d of %0d faults detected (%0d %%); per site %0d %0d %0d %0d %0d of 32",
             detected, total, detected * 100 / total,
             det_site[0], det_site[1], det_site[2], det_site[3], det_site[4]);
    check(total == 160, "all faults injected");
    check(detected * 10 >= total * 9, "fault coverage at least 90 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
