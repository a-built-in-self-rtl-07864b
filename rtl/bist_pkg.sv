// bist_pkg: types and constants shared by the BIST-iDAQ photon-counting datapath
// and its controller.
//
// The data words are 16 bits wide, as in the 16-bit photon counting chain. The
// BILBO mode encoding is the B1B2 table of the design (00 scan, 01 LFSR pattern
// generator, 10 D flip-flop, 11 MISR). The LFSR polynomial, the seeds and the
// controller's command bundle (dpu_ctrl_t) are choices of this implementation.
package bist_pkg;

  localparam int unsigned DATA_W = 16;

  typedef logic [DATA_W-1:0] word_t;

  // Feedback taps x^16 + x^15 + x^13 + x^4 + 1 (a maximal-length polynomial),
  // used by the pattern generator, both BILBOs and the response analyzer.
  localparam word_t LFSR_TAPS = 16'hD008;

  // Seeds loaded by a synchronous clear.
  localparam word_t TPG_SEED   = 16'hACE1;
  localparam word_t BILBO_SEED = 16'h0001;

  // Test lengths. CUT-1 and CUT-2 run for a number of clock cycles, CUT-3 for a
  // number of 16-bit words shifted through the PISO (16 cycles each, plus one
  // cycle so the last bit reaches the response analyzer).
  localparam int unsigned CUT1_CYCLES_DEFAULT = 64;
  localparam int unsigned CUT2_CYCLES_DEFAULT = 64;
  localparam int unsigned CUT3_WORDS_DEFAULT  = 8;

  // Fault-free signatures for the default seeds, polynomial and test lengths.
  localparam word_t SIG_CUT1_DEFAULT = 16'h2E4D;
  localparam word_t SIG_CUT2_DEFAULT = 16'h9302;
  localparam word_t SIG_CUT3_DEFAULT = 16'h8302;

  // BILBO control inputs B1B2.
  typedef enum logic [1:0] {
    BILBO_SCAN = 2'b00,   // serial scan chain: SI -> Q1 -> ... -> Qn -> SO
    BILBO_LFSR = 2'b01,   // autonomous pseudo-random pattern generator
    BILBO_DFF  = 2'b10,   // parallel register, Q <= D
    BILBO_MISR = 2'b11    // multiple-input signature register
  } bilbo_mode_t;

  // Which circuit under test is selected (also the ROM address and ctrl_sel4).
  typedef enum logic [1:0] {
    CUT_1 = 2'd0,         // 16-bit photon buffer, observed by BILBO-1
    CUT_2 = 2'd1,         // Kogge-Stone accumulator, observed by BILBO-2
    CUT_3 = 2'd2,         // PISO register, observed by the ORA
    CUT_NONE = 2'd3
  } cut_t;

  // One LFSR step (shift toward the MSB, XOR of the tapped bits enters bit 0).
  function automatic word_t lfsr_next(word_t q);
    return {q[DATA_W-2:0], ^(q & LFSR_TAPS)};
  endfunction

  // Command bundle from the controller unit to the datapath unit.
  typedef struct packed {
    logic        normal;     // normal mode: datapath paced by the clock divider
    logic        test_sel1;  // entrance mux: 1 = TPG pattern into the buffer
    logic        test_sel2;  // KSA input mux: 1 = BILBO-1 pattern
    logic        test_sel3;  // PISO input mux: 1 = BILBO-2 pattern
    logic        tpg_clr;
    logic        tpg_en;
    logic        buf_clr;
    logic        buf_en;
    bilbo_mode_t b1_mode;
    logic        b1_clr;
    logic        b1_en;
    bilbo_mode_t b2_mode;
    logic        b2_clr;
    logic        b2_en;
    logic        acc_clr;
    logic        acc_en;
    logic        piso_clr;
    logic        piso_load;
    logic        piso_shift;
    logic        ora_clr;
    logic        ora_en;
    cut_t        sig_sel;    // ctrl_sel4 and ROM address
    logic        cmp_en;
  } dpu_ctrl_t;

endpackage
