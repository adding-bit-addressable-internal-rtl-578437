// wimp51_pkg: types and constants shared by the Wimp51 blocks.
//
// The Wimp51 runs every instruction in three machine states, FETCH, DECODE and
// EXECUTE, held in a two-bit state register (Q1,Q0). The opcodes are the 8051
// encodings of the instructions the processor executes; the two bit-addressing
// opcodes SETB Rn.b / CLR Rn.b share D8-DF and are told apart by bit 3 of their
// second byte (1 = set, 0 = clear), bits 2..0 of that byte naming the bit.
// The state encoding is this design's choice.
package wimp51_pkg;

  typedef enum logic [1:0] {
    ST_FETCH   = 2'b00,
    ST_DECODE  = 2'b01,
    ST_EXECUTE = 2'b10
  } state_t;

  // Opcodes (low three bits of the Rn forms name the register).
  localparam logic [7:0] OP_ADDC_IMM = 8'h34;  // ADDC A,#data
  localparam logic [4:0] OP_ADDC_RN  = 5'b00111; // 38-3F ADDC A,Rn
  localparam logic [4:0] OP_ORL_RN   = 5'b01001; // 48-4F ORL A,Rn
  localparam logic [4:0] OP_ANL_RN   = 5'b01011; // 58-5F ANL A,Rn
  localparam logic [7:0] OP_JZ       = 8'h60;  // JZ rel
  localparam logic [4:0] OP_XRL_RN   = 5'b01101; // 68-6F XRL A,Rn
  localparam logic [7:0] OP_MOV_IMM  = 8'h74;  // MOV A,#data
  localparam logic [7:0] OP_SJMP     = 8'h80;  // SJMP rel
  localparam logic [7:0] OP_CLR_C    = 8'hC3;  // CLR C
  localparam logic [7:0] OP_SWAP     = 8'hC4;  // SWAP A
  localparam logic [4:0] OP_BIT_RN   = 5'b11011; // D8-DF SETB/CLR Rn.b
  localparam logic [4:0] OP_MOV_A_RN = 5'b11101; // E8-EF MOV A,Rn
  localparam logic [4:0] OP_MOV_RN_A = 5'b11111; // F8-FF MOV Rn,A

  // True for the opcodes that carry a second byte (immediate, offset or bit).
  function automatic logic is_two_byte(input logic [7:0] op);
    return (op == OP_ADDC_IMM) || (op == OP_MOV_IMM) || (op == OP_JZ) ||
           (op == OP_SJMP) || (op[7:3] == OP_BIT_RN);
  endfunction

endpackage
