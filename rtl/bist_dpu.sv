// bist_dpu: datapath unit of the BIST-iDAQ photon counter.
//
// The counting chain is photon buffer (CUT-1) -> Kogge-Stone accumulator
// (CUT-2) -> PISO register (CUT-3). Three multiplexers, driven by the
// controller, choose at each stage between normal data and test patterns:
//   entrance mux  D1 = test_sel1 ? TPG pattern Q0 : sampled input N
//   KSA mux       T1 = test_sel2 ? BILBO-1 Q1     : buffer output N1
//   PISO mux      T2 = test_sel3 ? BILBO-2 Q2     : accumulator output N2
// BILBO-1 watches the buffer output and BILBO-2 the accumulator output; the
// response analyzer watches the PISO serial output N3. The signature mux
// (ctrl_sel4 = ctrl_i.sig_sel) picks Q1, Q2 or Q3 as R1, the ROM gives the
// stored signature R2 at the same address, and the comparator reports
// pass_o / fail_o while ctrl_i.cmp_en is high.
// In normal mode (ctrl_i.normal) the buffer and accumulator are enabled once
// per sampling strobe of the clock divider, selected by clk_sel_i
// (0: every 16 cycles, 1: every 8 cycles), and the PISO loads the total every
// 16 cycles and shifts it out MSB first in between. In test mode every enable
// comes from the controller. The accumulator adds the word that the buffer
// captured at the previous strobe. Structure and names follow the design's
// datapath figure; the strobe scheme and clk_sel encoding are this
// implementation's choices. The BILBO scan chain runs scan_in_i -> BILBO-1 ->
// BILBO-2 -> scan_out_o.
module bist_dpu
  import bist_pkg::*;
#(
  parameter word_t SIG_CUT1 = SIG_CUT1_DEFAULT,
  parameter word_t SIG_CUT2 = SIG_CUT2_DEFAULT,
  parameter word_t SIG_CUT3 = SIG_CUT3_DEFAULT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  dpu_ctrl_t ctrl_i,
  input  logic      clk_sel_i,
  input  word_t     n_i,        // sampled photon data N[15:0]
  input  logic      scan_in_i,
  output logic      serial_o,   // N3: PISO serial output
  output word_t     count_o,    // accumulated photon count
  output logic      carry_o,    // accumulator carry out
  output logic      scan_out_o,
  output word_t     sig1_o,     // Q1
  output word_t     sig2_o,     // Q2
  output word_t     sig3_o,     // Q3
  output logic      pass_o,
  output logic      fail_o
);
  logic  tick8, tick16, sample_tick;
  logic  buf_en, acc_en, piso_load, piso_shift;
  logic  so1, so2;
  word_t q0, d1, n1, t1, n2, t2, q1, q2, q3, r1, r2;

  clock_divider u_div (
    .clk, .rst_n,
    .count_o (),
    .tick8_o (tick8),
    .tick16_o(tick16),
    .div8_o  (),
    .div16_o ()
  );

  assign sample_tick = clk_sel_i ? tick8 : tick16;
  assign buf_en      = ctrl_i.normal ? sample_tick : ctrl_i.buf_en;
  assign acc_en      = ctrl_i.normal ? sample_tick : ctrl_i.acc_en;
  assign piso_load   = ctrl_i.normal ? tick16      : ctrl_i.piso_load;
  assign piso_shift  = ctrl_i.normal ? !tick16     : ctrl_i.piso_shift;

  test_pattern_generator u_tpg (
    .clk, .rst_n,
    .clr_i(ctrl_i.tpg_clr),
    .en_i (ctrl_i.tpg_en),
    .q_o  (q0)
  );

  assign d1 = ctrl_i.test_sel1 ? q0 : n_i;

  photon_buffer u_cut1 (
    .clk, .rst_n,
    .clr_i(ctrl_i.buf_clr),
    .en_i (buf_en),
    .d_i  (d1),
    .q_o  (n1)
  );

  bilbo u_bilbo1 (
    .clk, .rst_n,
    .mode_i(ctrl_i.b1_mode),
    .clr_i (ctrl_i.b1_clr),
    .en_i  (ctrl_i.b1_en),
    .d_i   (n1),
    .si_i  (scan_in_i),
    .q_o   (q1),
    .so_o  (so1)
  );

  assign t1 = ctrl_i.test_sel2 ? q1 : n1;

  ksa_accumulator u_cut2 (
    .clk, .rst_n,
    .clr_i  (ctrl_i.acc_clr),
    .en_i   (acc_en),
    .din_i  (t1),
    .acc_o  (n2),
    .carry_o(carry_o)
  );

  bilbo u_bilbo2 (
    .clk, .rst_n,
    .mode_i(ctrl_i.b2_mode),
    .clr_i (ctrl_i.b2_clr),
    .en_i  (ctrl_i.b2_en),
    .d_i   (n2),
    .si_i  (so1),
    .q_o   (q2),
    .so_o  (so2)
  );

  assign t2 = ctrl_i.test_sel3 ? q2 : n2;

  piso_register u_cut3 (
    .clk, .rst_n,
    .clr_i  (ctrl_i.piso_clr),
    .load_i (piso_load),
    .shift_i(piso_shift),
    .d_i    (t2),
    .so_o   (serial_o)
  );

  output_response_analyzer u_ora (
    .clk, .rst_n,
    .clr_i(ctrl_i.ora_clr),
    .en_i (ctrl_i.ora_en),
    .si_i (serial_o),
    .q_o  (q3)
  );

  always_comb begin
    unique case (ctrl_i.sig_sel)
      CUT_1:   r1 = q1;
      CUT_2:   r1 = q2;
      CUT_3:   r1 = q3;
      default: r1 = '0;
    endcase
  end

  signature_rom #(
    .SIG_CUT1(SIG_CUT1), .SIG_CUT2(SIG_CUT2), .SIG_CUT3(SIG_CUT3)
  ) u_rom (
    .addr_i(ctrl_i.sig_sel),
    .data_o(r2)
  );

  signature_comparator u_cmp (
    .en_i  (ctrl_i.cmp_en),
    .sig_i (r1),
    .ref_i (r2),
    .pass_o,
    .fail_o
  );

  assign count_o    = n2;
  assign scan_out_o = so2;
  assign sig1_o     = q1;
  assign sig2_o     = q2;
  assign sig3_o     = q3;
endmodule
