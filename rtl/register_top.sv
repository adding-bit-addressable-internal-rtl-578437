// register_top: the Wimp51 register file R0..R7 with bit addressing.
//
// In the original Wimp51 a register can only be written as a whole byte. Here
// each of the eight registers can also have a single bit set or cleared.
//   - x selects the register through the original 3-8 decoder. The same
//     selection drives the read port rdata (MOV A,Rn, ORL A,Rn, ...).
//   - write_enable (REG_we, MOV Rn,A) loads di into the selected register.
//   - decoder_enable (the bit-address enable) turns on the second 3-8 decoder,
//     whose input bit_sel picks one bit; that bit of the selected register
//     loads set_clear (REG_in).
//   - An 8-2-1 mux (eight 2-to-1 muxes) feeds the registers: set_clear on all
//     eight lines while decoder_enable is high, di otherwise.
// bit_out reads bit bit_sel of the selected register; regs shows all eight
// registers.
//
// Timing: writes happen on the rising edge of clk; clrn clears every register
// asynchronously. Reads are combinational.
// The decoders, the 8-2-1 mux and its control follow the schematics of the
// register file; the read port is this design's choice, since the original
// Wimp51 read path is not shown.
module register_top (
  input  logic            clk,
  input  logic            clrn,
  input  logic [2:0]      x,
  input  logic            write_enable,
  input  logic [7:0]      di,
  input  logic            decoder_enable,
  input  logic [2:0]      bit_sel,
  input  logic            set_clear,
  output logic [7:0]      rdata,
  output logic            bit_out,
  output logic [7:0][7:0] regs
);
  logic [7:0] reg_dec;     // original decoder: register select
  logic [7:0] bit_dec;     // second decoder: bit select
  logic [7:0] d;           // 8-2-1 mux output
  logic [7:0] bit_rd;

  dec3to8 u_dec1 (.en(1'b1),           .x(x),       .dec(reg_dec));
  dec3to8 u_dec2 (.en(decoder_enable), .x(bit_sel), .dec(bit_dec));

  always_comb d = decoder_enable ? {8{set_clear}} : di;

  for (genvar i = 0; i < 8; i++) begin : g_reg
    bit_register u_reg (
      .clk             (clk),
      .clrn            (clrn),
      .d               (d),
      .parallel_load   (write_enable & reg_dec[i]),
      .original_decoder(reg_dec[i]),
      .dec_en          (decoder_enable),
      .second_dec      (bit_dec),
      .s               (bit_sel),
      .enable          (reg_dec[i]),
      .disp            (regs[i]),
      .bit_out         (bit_rd[i])
    );
  end

  always_comb begin
    rdata   = regs[x];
    bit_out = |bit_rd;
  end
endmodule
