// pc_alu: next value of the program counter.
//
// The program counter steps once for every byte fetched: in FETCH (opcode)
// and, for a two-byte instruction, again in DECODE (its second byte), so that
// the next FETCH finds the following instruction. In EXECUTE a taken jump
// (SJMP always, JZ when the accumulator is zero) adds the signed offset held
// in AUX to the program counter, which already points past the jump, as in
// the 8051. One 8-bit ripple-carry adder does all three: pc + 0 + 1 for a
// step, pc + aux + 0 for a jump.
//
// Ports: state (Q1,Q0), ir (instruction register), pc, aux, acc_zero;
// pc_next and pc_we (load pc_next at the next rising clock edge).
// Combinational. The inputs Q1/Q0 and IR bits and the 8-bit ripple adder are
// those of the block's schematic; the second increment for two-byte
// instructions is the one the block was changed to make.
module pc_alu
  import wimp51_pkg::*;
(
  input  state_t     state,
  input  logic [7:0] ir,
  input  logic [7:0] pc,
  input  logic [7:0] aux,
  input  logic       acc_zero,
  output logic [7:0] pc_next,
  output logic       pc_we
);
  logic jump;
  logic co_unused;

  always_comb begin
    jump  = (state == ST_EXECUTE) &&
            ((ir == OP_SJMP) || ((ir == OP_JZ) && acc_zero));
    pc_we = (state == ST_FETCH) ||
            ((state == ST_DECODE) && is_two_byte(ir)) || jump;
  end

  rca8 u_add (
    .a (pc),
    .b (jump ? aux : 8'h00),
    .ci(~jump),
    .s (pc_next),
    .co(co_unused)
  );
endmodule
