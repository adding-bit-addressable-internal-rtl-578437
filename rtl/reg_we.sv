// reg_we: parallel write enable of the register file.
//
// MOV Rn,A (opcodes F8-FF) copies the accumulator into register Rn. The
// enable is a six-input AND of the EXECUTE state and instruction register
// bits IR7..IR3, so it is high exactly in the EXECUTE state of MOV Rn,A.
// Purely combinational.
//
// Ports: execute, ir[7:3], reg_we_out. Inputs, output and the AND6 follow the
// block's schematic.
module reg_we
  import wimp51_pkg::*;
(
  input  logic       execute,
  input  logic [7:3] ir,
  output logic       reg_we_out
);
  always_comb reg_we_out = execute && (ir == OP_MOV_RN_A);
endmodule
