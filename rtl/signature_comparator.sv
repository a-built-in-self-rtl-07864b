// signature_comparator: compares a measured signature with the stored one.
//
// When en_i is high, pass_o is 1 if the selected signature sig_i ("R1") equals
// the ROM word ref_i ("R2") and fail_o is 1 otherwise; with en_i low both are
// 0. Combinational; the controller samples the result in its compare cycle.
module signature_comparator
  import bist_pkg::*;
(
  input  logic  en_i,
  input  word_t sig_i,
  input  word_t ref_i,
  output logic  pass_o,
  output logic  fail_o
);
  logic match;

  assign match  = (sig_i == ref_i);
  assign pass_o = en_i &  match;
  assign fail_o = en_i & ~match;
endmodule
