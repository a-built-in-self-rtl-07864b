// bist_controller: controller unit of the BIST-iDAQ.
//
// It follows the design's test algorithm. After reset the circuit is in normal
// mode and counts photons. The interrupt request int_i switches to test mode.
// In test mode, mode_reset_i returns to normal mode, and start_i runs the self
// test: first the 16-bit photon buffer (CUT-1), then the Kogge-Stone
// accumulator (CUT-2), then the PISO register (CUT-3). A circuit that fails
// raises its display_fail_o bit and stops the sequence, so the later stages are
// not tested; the controller then waits in test mode for the next start_i. When
// all three pass, all three display_pass_o bits are set and it also returns to
// test mode. While idle in test mode, scan_en_i puts both BILBOs in serial scan
// mode so their signatures can be shifted out.
//
// Each CUT test has three phases: one clear cycle (seeds the pattern source,
// zeroes the CUT and the compactor), a run of a fixed number of cycles set by
// the parameters (CUTn_CYCLES, or CUT3_WORDS words of 16 cycles plus one), and
// one compare cycle in which the comparator checks the compacted signature
// against the ROM and the result is registered. A CUT-1 or CUT-2 test thus
// takes CUTn_CYCLES + 2 cycles and a CUT-3 test 16 * CUT3_WORDS + 3; with the
// defaults the three results are registered 66, 132 and 263 cycles after the
// edge that samples start_i. All commands to the datapath
// (ctrl_o) are decoded from the state, the CUT under test and the run timer.
// The flowchart's states and branches are the design's; the phase split,
// the run lengths and the scan hook are this implementation's choices.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned CUT1_CYCLES = CUT1_CYCLES_DEFAULT,
  parameter int unsigned CUT2_CYCLES = CUT2_CYCLES_DEFAULT,
  parameter int unsigned CUT3_WORDS  = CUT3_WORDS_DEFAULT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      int_i,          // INT: enter test mode
  input  logic      start_i,        // START: run the self test
  input  logic      mode_reset_i,   // RESET: leave test mode
  input  logic      scan_en_i,      // shift the BILBO chain while idle in test mode
  input  logic      pass_i,         // comparator result
  input  logic      fail_i,
  output dpu_ctrl_t ctrl_o,
  output logic      test_mode_o,    // 1 outside normal mode
  output logic      busy_o,         // a CUT test is running
  output cut_t      cut_o,          // CUT under test, or last tested
  output logic      cut_valid_o,    // cut_o holds a CUT tested since start_i
  output logic [2:0] display_pass_o, // bit n-1: CUT-n passed
  output logic [2:0] display_fail_o  // bit n-1: CUT-n failed
);
  typedef enum logic [2:0] {
    ST_NORMAL, ST_TEST, ST_CLR, ST_RUN, ST_CMP
  } state_t;

  localparam int unsigned CUT3_CYCLES = 16 * CUT3_WORDS + 1;
  localparam int unsigned TIMER_W = 16;

  state_t             state_q;
  cut_t               cut_q;
  logic               cut_valid_q;
  logic [TIMER_W-1:0] timer_q;
  logic [TIMER_W-1:0] run_last;
  logic [2:0]         pass_q, fail_q;

  always_comb begin
    unique case (cut_q)
      CUT_1:   run_last = TIMER_W'(CUT1_CYCLES - 1);
      CUT_2:   run_last = TIMER_W'(CUT2_CYCLES - 1);
      default: run_last = TIMER_W'(CUT3_CYCLES - 1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_NORMAL;
      cut_q       <= CUT_1;
      cut_valid_q <= 1'b0;
      timer_q     <= '0;
      pass_q      <= '0;
      fail_q      <= '0;
    end else begin
      unique case (state_q)
        ST_NORMAL: if (int_i) state_q <= ST_TEST;
        ST_TEST: begin
          if (mode_reset_i) begin
            state_q <= ST_NORMAL;
          end else if (start_i) begin
            state_q     <= ST_CLR;
            cut_q       <= CUT_1;
            cut_valid_q <= 1'b1;
            pass_q      <= '0;
            fail_q      <= '0;
          end
        end
        ST_CLR: begin
          timer_q <= '0;
          state_q <= ST_RUN;
        end
        ST_RUN: begin
          timer_q <= timer_q + 1'b1;
          if (timer_q == run_last) state_q <= ST_CMP;
        end
        ST_CMP: begin
          if (pass_i) begin
            pass_q[cut_q] <= 1'b1;
            if (cut_q == CUT_3) begin
              state_q <= ST_TEST;
            end else begin
              cut_q   <= cut_t'(cut_q + 2'd1);
              state_q <= ST_CLR;
            end
          end else begin
            fail_q[cut_q] <= 1'b1;
            state_q       <= ST_TEST;
          end
        end
        default: state_q <= ST_NORMAL;
      endcase
    end
  end

  // Command decode.
  always_comb begin
    ctrl_o = '0;
    ctrl_o.b1_mode = BILBO_DFF;
    ctrl_o.b2_mode = BILBO_DFF;
    ctrl_o.sig_sel = cut_q;
    ctrl_o.test_sel1 = (state_q != ST_NORMAL);
    ctrl_o.test_sel2 = (state_q != ST_NORMAL);
    ctrl_o.test_sel3 = (state_q != ST_NORMAL);
    unique case (state_q)
      ST_NORMAL: begin
        ctrl_o.normal = 1'b1;
        ctrl_o.b1_en  = 1'b1;
        ctrl_o.b2_en  = 1'b1;
      end
      ST_TEST: begin
        if (scan_en_i) begin
          ctrl_o.b1_mode = BILBO_SCAN;
          ctrl_o.b2_mode = BILBO_SCAN;
          ctrl_o.b1_en   = 1'b1;
          ctrl_o.b2_en   = 1'b1;
        end
      end
      ST_CLR: begin
        unique case (cut_q)
          CUT_1: begin
            ctrl_o.tpg_clr = 1'b1;
            ctrl_o.buf_clr = 1'b1;
            ctrl_o.b1_clr  = 1'b1;
          end
          CUT_2: begin
            ctrl_o.b1_clr  = 1'b1;
            ctrl_o.acc_clr = 1'b1;
            ctrl_o.b2_clr  = 1'b1;
          end
          default: begin
            ctrl_o.b2_clr   = 1'b1;
            ctrl_o.piso_clr = 1'b1;
            ctrl_o.ora_clr  = 1'b1;
          end
        endcase
      end
      ST_RUN: begin
        unique case (cut_q)
          CUT_1: begin
            ctrl_o.tpg_en  = 1'b1;
            ctrl_o.buf_en  = 1'b1;
            ctrl_o.b1_mode = BILBO_MISR;
            ctrl_o.b1_en   = 1'b1;
          end
          CUT_2: begin
            ctrl_o.b1_mode = BILBO_LFSR;
            ctrl_o.b1_en   = 1'b1;
            ctrl_o.acc_en  = 1'b1;
            ctrl_o.b2_mode = BILBO_MISR;
            ctrl_o.b2_en   = 1'b1;
          end
          default: begin
            ctrl_o.piso_load  = (timer_q[3:0] == 4'd0);
            ctrl_o.piso_shift = (timer_q[3:0] != 4'd0);
            ctrl_o.b2_mode    = BILBO_LFSR;
            ctrl_o.b2_en      = (timer_q[3:0] == 4'd0);
            ctrl_o.ora_en     = 1'b1;
          end
        endcase
      end
      ST_CMP: ctrl_o.cmp_en = 1'b1;
      default: ;
    endcase
  end

  assign test_mode_o    = (state_q != ST_NORMAL);
  assign busy_o         = (state_q == ST_CLR) || (state_q == ST_RUN) || (state_q == ST_CMP);
  assign cut_o          = cut_q;
  assign cut_valid_o    = cut_valid_q;
  assign display_pass_o = pass_q;
  assign display_fail_o = fail_q;

  // The comparator gives exactly one verdict in the compare cycle, none elsewhere.
  a_one_verdict: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_CMP) |-> (pass_i ^ fail_i));
  a_no_verdict: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != ST_CMP) |-> !(pass_i || fail_i));
  a_cut_valid: assert property (@(posedge clk) disable iff (!rst_n) cut_q != CUT_NONE);
endmodule
