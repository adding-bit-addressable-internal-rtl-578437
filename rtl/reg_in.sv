// reg_in: the value a bit-addressing instruction writes.
//
// The second byte of SETB/CLR Rn.b holds the set/clear flag in bit 3
// (SETB R7.7 = DF 0F, CLR R0.7 = D8 07). In the DECODE state of such an
// instruction (sel_bit_en high) the memory presents that byte, and its bit 3
// is stored here; REG_in then drives the data input of the selected bit
// during EXECUTE. The value is held until the next bit-addressing decode.
//
// Ports: clk, rst_n (asynchronous, active low, clears REG_in), decode,
// ir3 (bit 3 of the byte read from memory), sel_bit_en, reg_in_out (REG_in).
// Inputs and output are those of the block's schematic; storing the flag in
// a flip-flop loaded in DECODE is this design's choice.
module reg_in (
  input  logic clk,
  input  logic rst_n,
  input  logic decode,
  input  logic ir3,
  input  logic sel_bit_en,
  output logic reg_in_out
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    reg_in_out <= 1'b0;
    else if (decode && sel_bit_en) reg_in_out <= ir3;
endmodule
