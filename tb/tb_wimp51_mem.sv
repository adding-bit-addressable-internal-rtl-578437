// tb_wimp51_mem: fill the memory through the load port, read every address back.
module tb_wimp51_mem;
  logic       clk = 0, we;
  logic [7:0] la, ld, a, q;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  wimp51_mem dut (.clk(clk), .load_we(we), .load_addr(la), .load_data(ld), .addr(a), .rdata(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; la = 0; ld = 0; a = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; la = 8'(i); ld = 8'($urandom); model[i] = ld;
    end
    @(negedge clk);
    we = 0;
    for (int i = 255; i >= 0; i--) begin
      a = 8'(i);
      #1;
      checks++;
      if (q !== model[i]) begin failures++; $display("FAIL addr %02h: %02h exp %02h", i, q, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
