// wimp51: the Wimp51 processor with bit-addressable internal registers.
//
// A small 8051-style processor of Von Neumann design: one memory holds the
// program, an 8-bit program counter walks it, and each instruction runs in
// three cycles (FETCH, DECODE, EXECUTE). Besides byte-wide register moves and
// accumulator arithmetic/logic, any single bit of R0..R7 can be set or
// cleared with a two-byte instruction:
//   first byte  11011rrr (D8-DF)  register Rr
//   second byte 0000sbbb          s = 1 set, s = 0 clear; bbb = bit number
// e.g. DF 0F sets R7.7, D8 07 clears R0.7.
// The added decode path: bit_address_en recognises D8-DF, aux_we loads the
// second byte into AUX in DECODE, reg_in keeps its set/clear flag, and in
// EXECUTE the register file's second decoder (driven by AUX[2:0]) enables the
// one flip-flop of Rr that loads the flag. pc_alu steps the program counter
// past the second byte.
//
// Ports: clk; rst_n (asynchronous, active low); load_we/load_addr/load_data
// write the memory (use while rst_n is low); pc, state, acc, carry, regs
// (R0..R7) and sel_bit (bit AUX[2:0] of register IR[2:0]) show the state.
module wimp51
  import wimp51_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_we,
  input  logic [7:0]      load_addr,
  input  logic [7:0]      load_data,
  output logic [7:0]      pc,
  output state_t          state,
  output logic [7:0]      acc,
  output logic            carry,
  output logic [7:0][7:0] regs,
  output logic            sel_bit
);
  logic [7:0] mem_data, mem_addr, ir, aux, pc_next, rdata;
  logic       decode, execute, pc_we, aux_wr, reg_wr, sel_bit_en, set_clear;
  logic       acc_zero;

  wimp51_mem #(.DEPTH(256)) u_mem (
    .clk(clk), .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .addr(mem_addr), .rdata(mem_data)
  );

  wimp51_control u_ctl (
    .clk(clk), .rst_n(rst_n), .mem_data(mem_data), .pc_next(pc_next),
    .pc_we(pc_we), .aux_we(aux_wr), .state(state), .decode(decode),
    .execute(execute), .pc(pc), .ir(ir), .aux(aux), .mem_addr(mem_addr)
  );

  pc_alu u_pc_alu (
    .state(state), .ir(ir), .pc(pc), .aux(aux), .acc_zero(acc_zero),
    .pc_next(pc_next), .pc_we(pc_we)
  );

  aux_we u_aux_we (.decode(decode), .ir(ir), .aux_we_out(aux_wr));

  bit_address_en u_bit_en (.ir(ir[7:3]), .dec_en_out(sel_bit_en));

  reg_we u_reg_we (.execute(execute), .ir(ir[7:3]), .reg_we_out(reg_wr));

  reg_in u_reg_in (
    .clk(clk), .rst_n(rst_n), .decode(decode), .ir3(mem_data[3]),
    .sel_bit_en(sel_bit_en), .reg_in_out(set_clear)
  );

  register_top u_regs (
    .clk(clk), .clrn(rst_n), .x(ir[2:0]), .write_enable(reg_wr), .di(acc),
    .decoder_enable(sel_bit_en & execute), .bit_sel(aux[2:0]),
    .set_clear(set_clear), .rdata(rdata), .bit_out(sel_bit), .regs(regs)
  );

  wimp51_alu u_alu (
    .clk(clk), .rst_n(rst_n), .execute(execute), .ir(ir), .imm(aux),
    .rdata(rdata), .acc(acc), .carry(carry), .acc_zero(acc_zero)
  );
endmodule
