// tb_bit_register: random parallel loads and single-bit writes of one register
// compared with a reference byte kept in the testbench; the 8-1 mux bit read
// is checked on every cycle.
module tb_bit_register;
  logic       clk = 0, clrn = 0;
  logic [7:0] d, second_dec, disp;
  logic       pl, od, den, en, bo;
  logic [2:0] s;
  logic [7:0] model;
  int checks = 0, failures = 0;
  int n_bit = 0, n_par = 0;

  bit_register dut (
    .clk(clk), .clrn(clrn), .d(d), .parallel_load(pl), .original_decoder(od),
    .dec_en(den), .second_dec(second_dec), .s(s), .enable(en), .disp(disp), .bit_out(bo)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'hFF; pl = 1; od = 1; den = 1; second_dec = 8'hFF; s = 0; en = 0;
    #12;
    checks++;
    if (disp !== 8'h00) begin failures++; $display("FAIL clear"); end
    @(negedge clk);
    pl = 0; den = 0;
    clrn  = 1;
    model = 8'h00;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d   = 8'($urandom);
      pl  = ($urandom % 4) == 0;
      od  = 1'($urandom);
      den = 1'($urandom);
      second_dec = 8'b1 << ($urandom % 8);
      s   = 3'($urandom);
      en  = 1'($urandom);
      #1;
      checks++;
      if (bo !== (en & model[s])) begin
        failures++;
        $display("FAIL bit read s=%0d en=%b bo=%b model=%02h", s, en, bo, model);
      end
      @(posedge clk);
      for (int k = 0; k < 8; k++)
        if (pl || (od && den && second_dec[k])) model[k] = d[k];
      if (pl) n_par++;
      else if (od && den) n_bit++;
      #1;
      checks++;
      if (disp !== model) begin
        failures++;
        $display("FAIL step %0d disp=%02h exp=%02h d=%02h pl=%b od=%b den=%b sd=%02h", i, disp, model, d, pl, od, den, second_dec);
      end
    end
    checks++;
    if (n_bit == 0 || n_par == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
