// tb_wimp51_alu: every accumulator operation with random operands against a
// reference model; A and C may change only in EXECUTE.
module tb_wimp51_alu;
  logic       clk = 0, rst_n = 0, ex, c, az, mc;
  logic [7:0] ir, imm, rd, acc, ma;
  int checks = 0, failures = 0;

  wimp51_alu dut (.clk(clk), .rst_n(rst_n), .execute(ex), .ir(ir), .imm(imm), .rdata(rd),
                  .acc(acc), .carry(c), .acc_zero(az));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ops [11] = '{8'h34, 8'h38, 8'h48, 8'h58, 8'h68, 8'h74, 8'hC3, 8'hC4, 8'hE8, 8'hF8, 8'h00};
    logic [8:0] s;
    ex = 0; ir = 0; imm = 0; rd = 0;
    #12;
    checks++;
    if (acc !== 0 || c !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    ma = 0; mc = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ir  = ops[$urandom % 11];
      if (ir[7:3] inside {5'b00111, 5'b01001, 5'b01011, 5'b01101, 5'b11101, 5'b11111})
        ir[2:0] = 3'($urandom);
      imm = 8'($urandom); rd = 8'($urandom); ex = ($urandom % 4) != 0;
      @(posedge clk);
      if (ex) begin
        casez (ir)
          8'h34:       begin s = ma + imm + mc; ma = s[7:0]; mc = s[8]; end
          8'b00111???: begin s = ma + rd + mc;  ma = s[7:0]; mc = s[8]; end
          8'b01001???: ma = ma | rd;
          8'b01011???: ma = ma & rd;
          8'b01101???: ma = ma ^ rd;
          8'h74:       ma = imm;
          8'hC3:       mc = 0;
          8'hC4:       ma = {ma[3:0], ma[7:4]};
          8'b11101???: ma = rd;
          default: ;
        endcase
      end
      #1;
      checks++;
      if (acc !== ma || c !== mc || az !== (ma == 0)) begin
        failures++;
        $display("FAIL ir=%02h ex=%b acc=%02h c=%b exp %02h %b", ir, ex, acc, c, ma, mc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
