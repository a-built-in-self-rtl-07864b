// signature_rom: read-only table of the fault-free signatures.
//
// Four 16-bit words addressed by addr_i ("addr[1:0]"): entry 0 is the expected
// BILBO-1 signature of the photon buffer test, entry 1 the BILBO-2 signature of
// the accumulator test, entry 2 the response analyzer signature of the PISO
// test, entry 3 is unused and reads zero. The read is combinational ("Q4").
// The contents are parameters; their defaults are the signatures of a
// fault-free circuit for the default test lengths of bist_controller
// (see bist_pkg), obtained by simulating the fault-free datapath.
module signature_rom
  import bist_pkg::*;
#(
  parameter word_t SIG_CUT1 = SIG_CUT1_DEFAULT,
  parameter word_t SIG_CUT2 = SIG_CUT2_DEFAULT,
  parameter word_t SIG_CUT3 = SIG_CUT3_DEFAULT
) (
  input  cut_t  addr_i,
  output word_t data_o
);
  word_t rom [4];

  assign rom[0] = SIG_CUT1;
  assign rom[1] = SIG_CUT2;
  assign rom[2] = SIG_CUT3;
  assign rom[3] = '0;

  assign data_o = rom[addr_i];
endmodule
