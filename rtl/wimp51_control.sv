// wimp51_control: the Wimp51 sequencer with its program counter,
// instruction register (IR) and auxiliary register (AUX).
//
// Every instruction takes three clock cycles: FETCH loads the byte at PC into
// IR, DECODE loads the byte at PC into AUX when aux_we says the instruction
// has a second byte, and EXECUTE lets the datapath act on IR and AUX. The
// program counter loads pc_next whenever pc_we is high (both computed by
// pc_alu). The memory address is always the program counter.
//
// Ports: clk, rst_n (asynchronous, active low: state FETCH, PC, IR and AUX
// cleared), mem_data (byte read at mem_addr), pc_next, pc_we, aux_we;
// state (state bits Q1,Q0), decode, execute, pc, ir, aux, mem_addr.
// The FETCH/DECODE/EXECUTE states and their names follow the original
// Wimp51 signals; the state encoding and reset values are this design's choice.
module wimp51_control
  import wimp51_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] mem_data,
  input  logic [7:0] pc_next,
  input  logic       pc_we,
  input  logic       aux_we,
  output state_t     state,
  output logic       decode,
  output logic       execute,
  output logic [7:0] pc,
  output logic [7:0] ir,
  output logic [7:0] aux,
  output logic [7:0] mem_addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_FETCH;
      pc    <= 8'h00;
      ir    <= 8'h00;
      aux   <= 8'h00;
    end else begin
      unique case (state)
        ST_FETCH:   state <= ST_DECODE;
        ST_DECODE:  state <= ST_EXECUTE;
        default:    state <= ST_FETCH;
      endcase
      if (state == ST_FETCH) ir  <= mem_data;
      if (aux_we)            aux <= mem_data;
      if (pc_we)             pc  <= pc_next;
    end
  end

  always_comb begin
    decode   = (state == ST_DECODE);
    execute  = (state == ST_EXECUTE);
    mem_addr = pc;
  end
endmodule
