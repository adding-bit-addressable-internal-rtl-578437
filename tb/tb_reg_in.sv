// tb_reg_in: the set/clear flag is captured only in DECODE of a bit instruction.
// Random stimulus against a reference flip-flop kept in the testbench.
module tb_reg_in;
  logic clk = 0, rst_n = 0, dec, ir3, en, y, model;
  int checks = 0, failures = 0;

  reg_in dut (.clk(clk), .rst_n(rst_n), .decode(dec), .ir3(ir3), .sel_bit_en(en), .reg_in_out(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec = 0; ir3 = 1; en = 1;
    #12;
    checks++;
    if (y !== 1'b0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      dec = 1'($urandom); ir3 = 1'($urandom); en = 1'($urandom);
      @(posedge clk);
      if (dec && en) model = ir3;
      #1;
      checks++;
      if (y !== model) begin
        failures++;
        $display("FAIL step %0d dec=%b en=%b ir3=%b y=%b exp=%b", i, dec, en, ir3, y, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
