// aux_we: write enable of the AUX register.
//
// Two-byte instructions (ADDC A,#data, MOV A,#data, JZ rel, SJMP rel and the
// bit-addressing SETB/CLR Rn.b) carry a second byte: an immediate, a jump
// offset, or the bit number and set/clear flag. While the opcode is in the
// instruction register and the processor is in DECODE, the memory presents
// that second byte and AUX_WE loads it into AUX. Combinational.
//
// Ports: decode (DECODE state), ir[7:0] (instruction register), aux_we.
// The full opcode is decoded: the upper nibble alone cannot tell ADDC A,#data
// (34) from ADDC A,Rn (38-3F) or JZ (60) from XRL A,Rn (68-6F).
module aux_we
  import wimp51_pkg::*;
(
  input  logic       decode,
  input  logic [7:0] ir,
  output logic       aux_we_out
);
  always_comb aux_we_out = decode & is_two_byte(ir);
endmodule
