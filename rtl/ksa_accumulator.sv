// ksa_accumulator: photon count accumulator (circuit under test 2).
//
// A 16-bit register whose next value is its own value plus din_i, added by a
// Kogge-Stone adder (ksa_adder). Each cycle with en_i high it accumulates;
// the synchronous clear clr_i and the asynchronous reset set it to zero.
// acc_o is the running total (one cycle after the add); carry_o is the carry
// out of the add in progress, high when the 16-bit total wraps. The total wraps
// modulo 2^16, a choice of this implementation: the design does not say what
// happens on overflow.
module ksa_accumulator
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr_i,
  input  logic  en_i,
  input  word_t din_i,
  output word_t acc_o,
  output logic  carry_o
);
  word_t acc_q, sum;

  ksa_adder #(.W(DATA_W)) u_ksa (
    .a_i   (acc_q),
    .b_i   (din_i),
    .cin_i (1'b0),
    .sum_o (sum),
    .cout_o(carry_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc_q <= '0;
    else if (clr_i) acc_q <= '0;
    else if (en_i)  acc_q <= sum;
  end

  assign acc_o = acc_q;
endmodule
