// wimp51_alu: accumulator A, carry flag C and the arithmetic/logic unit.
//
// In EXECUTE the instruction in IR updates A and C:
//   MOV A,Rn  (E8-EF)  A = Rn          MOV A,#d  (74)  A = d
//   ORL A,Rn  (48-4F)  A = A | Rn      ANL A,Rn  (58-5F)  A = A & Rn
//   XRL A,Rn  (68-6F)  A = A ^ Rn      SWAP A    (C4)  swap nibbles of A
//   ADDC A,Rn (38-3F)  {C,A} = A + Rn + C
//   ADDC A,#d (34)     {C,A} = A + d + C
//   CLR C     (C3)     C = 0
// Rn arrives on rdata from the register file, #d on imm (AUX). Any other
// opcode leaves A and C alone. acc_zero feeds the JZ test.
//
// Ports: clk, rst_n (asynchronous, active low, clears A and C), execute,
// ir, imm, rdata; acc, carry, acc_zero. A and C change on the rising clock
// edge that ends EXECUTE. The instruction set is the one the processor's test
// program uses, with 8051 semantics; the structure is this design's own.
module wimp51_alu
  import wimp51_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       execute,
  input  logic [7:0] ir,
  input  logic [7:0] imm,
  input  logic [7:0] rdata,
  output logic [7:0] acc,
  output logic       carry,
  output logic       acc_zero
);
  logic [7:0] add_b, sum, acc_d;
  logic       co, c_d;

  always_comb add_b = (ir == OP_ADDC_IMM) ? imm : rdata;

  rca8 u_add (.a(acc), .b(add_b), .ci(carry), .s(sum), .co(co));

  always_comb begin
    acc_d = acc;
    c_d   = carry;
    if (ir == OP_ADDC_IMM || ir[7:3] == OP_ADDC_RN) begin
      acc_d = sum;
      c_d   = co;
    end else if (ir == OP_MOV_IMM)         acc_d = imm;
    else if (ir[7:3] == OP_MOV_A_RN)       acc_d = rdata;
    else if (ir[7:3] == OP_ORL_RN)         acc_d = acc | rdata;
    else if (ir[7:3] == OP_ANL_RN)         acc_d = acc & rdata;
    else if (ir[7:3] == OP_XRL_RN)         acc_d = acc ^ rdata;
    else if (ir == OP_SWAP)                acc_d = {acc[3:0], acc[7:4]};
    else if (ir == OP_CLR_C)               c_d   = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc   <= 8'h00;
      carry <= 1'b0;
    end else if (execute) begin
      acc   <= acc_d;
      carry <= c_d;
    end

  always_comb acc_zero = (acc == 8'h00);
endmodule
