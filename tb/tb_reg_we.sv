// tb_reg_we: exhaustive check of the MOV Rn,A write enable.
// Every opcode with EXECUTE low and high; expected high only for F8-FF in EXECUTE.
module tb_reg_we;
  logic [7:0] op;
  logic       ex, y;
  int checks = 0, failures = 0;

  reg_we dut (.execute(ex), .ir(op[7:3]), .reg_we_out(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 256; i++) begin
        ex = e[0];
        op = 8'(i);
        #1;
        checks++;
        if (y !== (e == 1 && i >= 8'hF8)) begin
          failures++;
          $display("FAIL ex=%0d op=%02h y=%b", e, op, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
