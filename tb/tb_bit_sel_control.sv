// tb_bit_sel_control: truth table of the per-bit load enable (AND of three).
module tb_bit_sel_control;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  bit_sel_control dut (.original_decoder(a), .dec_en(b), .second_decoder(c), .control(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (y !== (i == 7)) begin
        failures++;
        $display("FAIL in=%03b y=%b", i[2:0], y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
