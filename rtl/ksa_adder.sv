// ksa_adder: W-bit Kogge-Stone parallel prefix adder.
//
// Bit generate g = a & b and propagate p = a ^ b are combined in log2(W) prefix
// levels; at level k every bit i >= 2^k merges with bit i - 2^k, which gives
// the minimum logic depth and a fan-out of two per node. The carry into bit i
// is the group generate of bits i-1..0 OR'ed with the group propagate AND cin.
// Purely combinational: sum_o and cout_o follow the inputs. The design uses a
// 16-bit Kogge-Stone adder as the accumulator's adding element; its gate
// netlist is not given, so this is the textbook prefix structure.
module ksa_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic         cin_i,
  output logic [W-1:0] sum_o,
  output logic         cout_o
);
  localparam int unsigned LEVELS = $clog2(W);

  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];
  logic [W:0]   carry;

  assign g[0] = a_i & b_i;
  assign p[0] = a_i ^ b_i;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    // Bits below D have no partner at this level and keep their values.
    assign g[k+1] = g[k] | (p[k] & (g[k] << D));
    assign p[k+1] = p[k] & ((p[k] << D) | W'((1 << D) - 1));
  end

  assign carry[0] = cin_i;
  for (genvar i = 0; i < W; i++) begin : g_carry
    assign carry[i+1] = g[LEVELS][i] | (p[LEVELS][i] & cin_i);
  end

  assign sum_o  = p[0] ^ carry[W-1:0];
  assign cout_o = carry[W];
endmodule
