// wimp51_mem: the Wimp51's single memory, holding the program.
//
// A DEPTH x 8 array. The processor reads it combinationally at addr (the
// program counter) for both opcodes and second bytes. A separate write port
// (load_we, load_addr, load_data, written on the rising clock edge) puts a
// program into it while the processor is held in reset.
// Depth 256 matches the 8-bit program counter; the loading port and the
// asynchronous read are this design's choices.
module wimp51_mem #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     load_we,
  input  logic [$clog2(DEPTH)-1:0] load_addr,
  input  logic [7:0]               load_data,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [7:0]               rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (load_we) mem[load_addr] <= load_data;

  always_comb rdata = mem[addr];
endmodule
