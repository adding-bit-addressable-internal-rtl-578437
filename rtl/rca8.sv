// rca8: 8-bit ripple-carry adder.
//
// Eight full adders chained through their carries: s = a + b + ci, with the
// carry out in co. Combinational; the carry ripples through all eight bits.
module rca8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       ci,
  output logic [7:0] s,
  output logic       co
);
  logic [8:0] c;

  assign c[0] = ci;
  for (genvar i = 0; i < 8; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign co = c[8];
endmodule
