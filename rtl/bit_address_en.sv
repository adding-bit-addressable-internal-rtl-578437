// bit_address_en: recognises the bit-addressing instructions.
//
// The upper five bits of the instruction register are compared with 11011,
// the pattern shared by the opcodes D8-DF (SETB Rn.b and CLR Rn.b, register
// number in IR2..IR0). DEC_EN_OUT is high for the whole time such an opcode
// sits in the instruction register; the stages that use it gate it with the
// machine state. Purely combinational.
//
// Ports: ir[7:3] (instruction register bits IR7..IR3), dec_en_out.
// The inputs IR7, IR5, IR4 and IR3 and the output name follow the block's
// schematic; the schematic's fifth input reads "IR0", taken here as IR6, the
// only other bit that separates D8-DF from the other opcodes.
module bit_address_en (
  input  logic [7:3] ir,
  output logic       dec_en_out
);
  always_comb dec_en_out = ir[7] & ir[6] & ~ir[5] & ir[4] & ir[3];
endmodule
