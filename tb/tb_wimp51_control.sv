// tb_wimp51_control: the FETCH -> DECODE -> EXECUTE cycle, IR load in FETCH,
// AUX load when aux_we is high, PC load when pc_we is high.
module tb_wimp51_control;
  import wimp51_pkg::*;
  logic       clk = 0, rst_n = 0, pc_we, aux_we, dec, ex;
  logic [7:0] md, pn, pc, ir, aux, ma;
  state_t     st, mst;
  logic [7:0] mpc, mir, maux;
  int checks = 0, failures = 0;

  wimp51_control dut (
    .clk(clk), .rst_n(rst_n), .mem_data(md), .pc_next(pn), .pc_we(pc_we), .aux_we(aux_we),
    .state(st), .decode(dec), .execute(ex), .pc(pc), .ir(ir), .aux(aux), .mem_addr(ma)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    md = 0; pn = 0; pc_we = 0; aux_we = 0;
    @(negedge clk);
    rst_n = 1;
    mst = ST_FETCH; mpc = 0; mir = 0; maux = 0;
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (st !== mst || pc !== mpc || ir !== mir || aux !== maux || ma !== mpc ||
          dec !== (mst == ST_DECODE) || ex !== (mst == ST_EXECUTE)) begin
        failures++;
        $display("FAIL %0d st=%0d pc=%02h ir=%02h aux=%02h exp %0d %02h %02h %02h",
                 i, st, pc, ir, aux, mst, mpc, mir, maux);
      end
      md = 8'($urandom); pn = 8'($urandom); pc_we = 1'($urandom); aux_we = 1'($urandom);
      @(posedge clk);
      if (mst == ST_FETCH) mir = md;
      if (aux_we) maux = md;
      if (pc_we) mpc = pn;
      mst = (mst == ST_FETCH) ? ST_DECODE : (mst == ST_DECODE) ? ST_EXECUTE : ST_FETCH;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
