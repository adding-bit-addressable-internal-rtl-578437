// bit_register: one 8-bit internal register (R0..R7) with bit addressing.
//
// Eight D flip-flops, each with a self loop that holds its value unless it is
// loaded. A flip-flop loads its data input when either
//   - parallel_load is high (the whole byte is written, as by MOV Rn,A), or
//   - its BIT_SEL_CONTROL gate is high: this register is chosen by the
//     original register decoder, the bit-address enable is high, and the
//     second decoder chooses this bit (SETB/CLR Rn.b).
// The data input d comes from the register file's 8-2-1 mux: the accumulator
// for a parallel write, the set/clear value on every line for a bit write, so
// only the one enabled flip-flop changes. disp shows the stored byte and an
// 8-1 mux reads the bit chosen by s when enable is high.
//
// Timing: flip-flops load on the rising clock edge; clrn clears them
// asynchronously. Outputs follow the flip-flops without delay.
// Ports, the self loop, the eight BIT_SEL_CONTROL gates and the 8-1 mux follow
// the register's schematic; the clock edge and clear polarity are this design's
// choice.
module bit_register (
  input  logic       clk,
  input  logic       clrn,
  input  logic [7:0] d,
  input  logic       parallel_load,
  input  logic       original_decoder,
  input  logic       dec_en,
  input  logic [7:0] second_dec,
  input  logic [2:0] s,
  input  logic       enable,
  output logic [7:0] disp,
  output logic       bit_out
);
  logic [7:0] control;
  logic [7:0] q;

  for (genvar k = 0; k < 8; k++) begin : g_bit
    bit_sel_control u_ctl (
      .original_decoder(original_decoder),
      .dec_en          (dec_en),
      .second_decoder  (second_dec[k]),
      .control         (control[k])
    );
  end

  always_ff @(posedge clk or negedge clrn)
    if (!clrn) q <= '0;
    else
      for (int k = 0; k < 8; k++)
        if (parallel_load || control[k]) q[k] <= d[k];

  mux8to1 u_mux (.d(q), .s(s), .en(enable), .y(bit_out));

  assign disp = q;
endmodule
