// tb_bit_address_en: exhaustive check of the D8-DF opcode decoder.
// All 256 opcodes are applied; the expected output is high only for 0xD8..0xDF.
module tb_bit_address_en;
  logic [7:0] op;
  logic       y;
  int checks = 0, failures = 0;

  bit_address_en dut (.ir(op[7:3]), .dec_en_out(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      op = 8'(i);
      #1;
      checks++;
      if (y !== (i >= 8'hD8 && i <= 8'hDF)) begin
        failures++;
        $display("FAIL op=%02h y=%b", op, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
