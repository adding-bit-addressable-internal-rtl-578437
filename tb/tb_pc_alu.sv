// tb_pc_alu: next-PC rules for every state, opcode class and accumulator-zero
// flag, with random PC and offset values, against a reference in the testbench.
module tb_pc_alu;
  import wimp51_pkg::*;
  state_t     st;
  logic [7:0] ir, pc, aux, nxt;
  logic       az, we;
  int checks = 0, failures = 0;

  pc_alu dut (.state(st), .ir(ir), .pc(pc), .aux(aux), .acc_zero(az), .pc_next(nxt), .pc_we(we));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ops [8] = '{8'h34, 8'h74, 8'h60, 8'h80, 8'hDB, 8'hEF, 8'hC4, 8'h3B};
    logic       exp_we;
    logic [7:0] exp_pc;
    logic       two, jmp;
    for (int i = 0; i < 4000; i++) begin
      st  = state_t'($urandom % 3);
      ir  = ($urandom % 2) ? ops[$urandom % 8] : 8'($urandom);
      pc  = 8'($urandom);
      aux = 8'($urandom);
      az  = 1'($urandom);
      #1;
      two = (ir == 8'h34 || ir == 8'h74 || ir == 8'h60 || ir == 8'h80 || ir[7:3] == 5'b11011);
      jmp = (st == ST_EXECUTE) && (ir == 8'h80 || (ir == 8'h60 && az));
      exp_we = (st == ST_FETCH) || (st == ST_DECODE && two) || jmp;
      exp_pc = jmp ? 8'(pc + $signed(aux)) : 8'(pc + 1);
      checks++;
      if (we !== exp_we || (exp_we && nxt !== exp_pc)) begin
        failures++;
        $display("FAIL st=%0d ir=%02h pc=%02h aux=%02h az=%b -> we=%b nxt=%02h exp %b %02h",
                 st, ir, pc, aux, az, we, nxt, exp_we, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
