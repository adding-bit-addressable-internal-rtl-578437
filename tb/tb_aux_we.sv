// tb_aux_we: exhaustive check of the AUX write enable.
// Expected high in DECODE for the two-byte opcodes 34, 60, 74, 80 and D8-DF.
module tb_aux_we;
  logic [7:0] op;
  logic       dec, y;
  int checks = 0, failures = 0;

  aux_we dut (.decode(dec), .ir(op), .aux_we_out(y));

  function automatic logic two_byte(int o);
    return o == 'h34 || o == 'h60 || o == 'h74 || o == 'h80 || (o >= 'hD8 && o <= 'hDF);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < 256; i++) begin
        dec = d[0];
        op  = 8'(i);
        #1;
        checks++;
        if (y !== (d == 1 && two_byte(i))) begin
          failures++;
          $display("FAIL dec=%0d op=%02h y=%b", d, op, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
