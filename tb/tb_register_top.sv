// tb_register_top: the register file against a reference array of eight bytes.
// Random byte writes (MOV Rn,A), bit sets and bit clears (SETB/CLR Rn.b) and
// idle cycles; the read port, the bit read and all eight registers are checked
// after every clock.
module tb_register_top;
  logic            clk = 0, clrn = 0;
  logic [2:0]      x, bit_sel;
  logic            we, den, sc, bo;
  logic [7:0]      di, rdata;
  logic [7:0][7:0] regs, model;
  int checks = 0, failures = 0;
  int n_set = 0, n_clr = 0, n_par = 0;
  int unsigned op;

  register_top dut (
    .clk(clk), .clrn(clrn), .x(x), .write_enable(we), .di(di), .decoder_enable(den),
    .bit_sel(bit_sel), .set_clear(sc), .rdata(rdata), .bit_out(bo), .regs(regs)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; bit_sel = 0; we = 0; den = 0; sc = 0; di = 0;
    #12;
    clrn  = 1;
    model = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x = 3'($urandom); bit_sel = 3'($urandom); di = 8'($urandom); sc = 1'($urandom);
      op = $urandom % 3;
      unique case (op)
        0: begin we = 1; den = 0; end
        1: begin we = 0; den = 1; end
        default: begin we = 0; den = 0; end
      endcase
      #1;
      checks++;
      if (rdata !== model[x] || bo !== model[x][bit_sel]) begin
        failures++;
        $display("FAIL read x=%0d rdata=%02h bo=%b exp=%02h", x, rdata, bo, model[x]);
      end
      @(posedge clk);
      if (we) begin model[x] = di; n_par++; end
      if (den) begin
        model[x][bit_sel] = sc;
        if (sc) n_set++; else n_clr++;
      end
      #1;
      checks++;
      if (regs !== model) begin
        failures++;
        $display("FAIL step %0d regs=%h exp=%h", i, regs, model);
      end
    end
    checks++;
    if (n_set == 0 || n_clr == 0 || n_par == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
