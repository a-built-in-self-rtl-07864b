// bilbo: 16-bit built-in logic block observer.
//
// One register that, by its control inputs B1B2 (mode_i), works as
//   00  serial scan chain   Q <= {Q[14:0], si_i}, so_o = Q[15]
//   01  LFSR pattern generator, Q <= lfsr(Q)
//   10  normal D flip-flops, Q <= d_i
//   11  multiple-input signature register (MISR), Q <= lfsr(Q) ^ d_i
// The mode table is the design's. BILBO-1 compacts the buffer response (MISR)
// in the CUT-1 test and drives the accumulator (LFSR) in the CUT-2 test; BILBO-2
// compacts the accumulator response and then drives the PISO.
// en_i (a clock enable, so a signature can be held and read) and the
// synchronous clear clr_i, which loads SEED, are this implementation's
// additions; so is the polynomial. All updates are on the rising clock edge.
module bilbo
  import bist_pkg::*;
#(
  parameter word_t SEED = BILBO_SEED
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bilbo_mode_t mode_i,
  input  logic        clr_i,
  input  logic        en_i,
  input  word_t       d_i,
  input  logic        si_i,
  output word_t       q_o,
  output logic        so_o
);
  word_t q_q, q_d;

  always_comb begin
    unique case (mode_i)
      BILBO_SCAN: q_d = {q_q[DATA_W-2:0], si_i};
      BILBO_LFSR: q_d = lfsr_next(q_q);
      BILBO_DFF:  q_d = d_i;
      BILBO_MISR: q_d = lfsr_next(q_q) ^ d_i;
      default:    q_d = q_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q_q <= SEED;
    else if (clr_i) q_q <= SEED;
    else if (en_i)  q_q <= q_d;
  end

  assign q_o  = q_q;
  assign so_o = q_q[DATA_W-1];
endmodule
