// bit_sel_control: load enable of one flip-flop of the register file.
//
// A bit of the register file is written by a bit-addressing instruction only
// when its register is chosen by the original register decoder, the bit
// address enable (the instruction is SETB/CLR Rn.b in EXECUTE) is high, and
// its bit is chosen by the second decoder. CONTROL is the AND of the three.
// Each register holds eight of these blocks, one per bit. Combinational.
//
// Ports: original_decoder, dec_en (the 3-8 decoder enable), second_decoder,
// control. Names follow the block's schematic.
module bit_sel_control (
  input  logic original_decoder,
  input  logic dec_en,
  input  logic second_decoder,
  output logic control
);
  always_comb control = original_decoder & dec_en & second_decoder;
endmodule
