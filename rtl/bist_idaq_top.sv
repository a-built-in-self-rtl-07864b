// bist_idaq_top: 16-bit photon counting data acquisition with built-in self test.
//
// The datapath unit (bist_dpu) holds the counting chain and its test
// resources; the controller unit (bist_controller) sequences normal counting
// and the CUT-1 / CUT-2 / CUT-3 self test; status_display turns count and test
// status into BCD digits, seven-segment codes and LEDs. The analog front end
// (photodetector, amplifier, ADC) is outside: its digitized sample enters on
// n_i. All logic runs on clk with an asynchronous active-low reset rst_n.
// Control inputs int_i, start_i, mode_reset_i and scan_en_i are synchronous
// levels sampled on the rising edge. See bist_controller for test timing.
module bist_idaq_top
  import bist_pkg::*;
#(
  parameter int unsigned CUT1_CYCLES = CUT1_CYCLES_DEFAULT,
  parameter int unsigned CUT2_CYCLES = CUT2_CYCLES_DEFAULT,
  parameter int unsigned CUT3_WORDS  = CUT3_WORDS_DEFAULT,
  parameter word_t       SIG_CUT1    = SIG_CUT1_DEFAULT,
  parameter word_t       SIG_CUT2    = SIG_CUT2_DEFAULT,
  parameter word_t       SIG_CUT3    = SIG_CUT3_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      n_i,            // digitized photon sample N[15:0]
  input  logic       clk_sel_i,      // sampling strobe: 0 = clk/16, 1 = clk/8
  input  logic       int_i,          // enter test mode
  input  logic       start_i,        // run the self test (in test mode)
  input  logic       mode_reset_i,   // back to normal mode (in test mode)
  input  logic       scan_en_i,      // shift the BILBO scan chain
  input  logic       scan_in_i,
  output logic       scan_out_o,
  output logic       serial_o,       // PISO serial output N3
  output word_t      count_o,        // accumulated photon count
  output logic       carry_o,
  output logic       test_mode_o,
  output logic       busy_o,
  output logic       pass_o,         // comparator verdict, compare cycle only
  output logic       fail_o,
  output logic [2:0] display_pass_o, // CUT-3..CUT-1 passed
  output logic [2:0] display_fail_o, // CUT-3..CUT-1 failed
  output logic [3:0] digit_o [6],
  output logic [6:0] hex_n_o [6],
  output logic [9:0] ledr_o
);
  dpu_ctrl_t ctrl;
  cut_t      cut;
  logic      cut_valid;

  bist_controller #(
    .CUT1_CYCLES(CUT1_CYCLES), .CUT2_CYCLES(CUT2_CYCLES), .CUT3_WORDS(CUT3_WORDS)
  ) u_cu (
    .clk, .rst_n,
    .int_i, .start_i, .mode_reset_i, .scan_en_i,
    .pass_i        (pass_o),
    .fail_i        (fail_o),
    .ctrl_o        (ctrl),
    .test_mode_o,
    .busy_o,
    .cut_o         (cut),
    .cut_valid_o   (cut_valid),
    .display_pass_o,
    .display_fail_o
  );

  bist_dpu #(
    .SIG_CUT1(SIG_CUT1), .SIG_CUT2(SIG_CUT2), .SIG_CUT3(SIG_CUT3)
  ) u_dpu (
    .clk, .rst_n,
    .ctrl_i    (ctrl),
    .clk_sel_i,
    .n_i,
    .scan_in_i,
    .serial_o,
    .count_o,
    .carry_o,
    .scan_out_o,
    .sig1_o    (),
    .sig2_o    (),
    .sig3_o    (),
    .pass_o,
    .fail_o
  );

  status_display u_disp (
    .test_mode_i(test_mode_o),
    .cut_i      (cut),
    .cut_valid_i(cut_valid),
    .pass_i     (display_pass_o),
    .count_i    (count_o),
    .digit_o,
    .hex_n_o,
    .ledr_o
  );
endmodule
