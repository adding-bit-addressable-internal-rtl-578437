// tb_wimp51: end-to-end run of the processor with all parameters at their
// defaults. It loads the set/clear test program (bit sets of R0..R7, byte
// arithmetic and logic through A, six bit clears of R0, a JZ and a SJMP that
// halts), releases reset and checks, after every instruction, the address it
// was fetched from, A, C, all eight registers, the bit read port and that the
// instruction took three clock cycles. Addresses 2F-31, which the taken JZ
// skips, hold MOV A,#FF / NOP so that a wrong jump shows in A.
// It counts each mechanism, from the instructions whose results matched: bit
// set, bit clear, byte write of a register, two-byte instruction (second byte
// through AUX), taken jump; one that never happened is a failure.
module tb_wimp51;
  import wimp51_pkg::*;

  logic            clk = 0, rst_n = 0, load_we = 0, sel_bit, carry;
  logic [7:0]      load_addr = 0, load_data = 0, pc, acc;
  logic [7:0][7:0] regs;
  state_t          state;
  int checks = 0, failures = 0;

  wimp51 dut (
    .clk(clk), .rst_n(rst_n), .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .pc(pc), .state(state), .acc(acc), .carry(carry), .regs(regs), .sel_bit(sel_bit)
  );

  always #5 clk = ~clk;

  // Program image, addresses 00..33.
  localparam int PLEN = 52;
  logic [7:0] prog [PLEN] = '{
    8'hDF, 8'h0F, 8'hDE, 8'h0E, 8'hDD, 8'h0D, 8'hDC, 8'h0C,   // 00 SETB R7.7 .. R4.4
    8'hDB, 8'h0B, 8'hDA, 8'h0A, 8'hD9, 8'h09, 8'hD8, 8'h08,   // 08 SETB R3.3 .. R0.0
    8'hEF, 8'h4D, 8'hC4, 8'h34, 8'h96, 8'hC3, 8'h3B, 8'h49,   // 10 MOV ORL SWAP ADDC# CLR C ADDC ORL
    8'hF8, 8'h74, 8'h55, 8'h68, 8'hF8, 8'hD8, 8'h07, 8'hD8,   // 18 MOV R0,A MOV A,#55 XRL MOV CLR..
    8'h06, 8'hD8, 8'h05, 8'hD8, 8'h04, 8'hD8, 8'h02, 8'hD8,   // 20 CLR R0.6 .. R0.2
    8'h00, 8'h58, 8'hF8, 8'h74, 8'h00, 8'h60, 8'h03, 8'h74,   // 28 CLR R0.0 ANL MOV MOV A,#0 JZ (2F: trap)
    8'hFF, 8'h00, 8'h80, 8'hFE                                // 30 trap, SJMP $
  };

  // Expected result of each instruction: fetch address, A, C, register
  // written (-1: none) and its new value.
  typedef struct { int addr; int a; int c; int r; int v; } step_t;
  localparam int NSTEP = 30;
  step_t exp_steps [NSTEP] = '{
    '{'h00, 'h00, 0, 7, 'h80}, '{'h02, 'h00, 0, 6, 'h40}, '{'h04, 'h00, 0, 5, 'h20},
    '{'h06, 'h00, 0, 4, 'h10}, '{'h08, 'h00, 0, 3, 'h08}, '{'h0A, 'h00, 0, 2, 'h04},
    '{'h0C, 'h00, 0, 1, 'h02}, '{'h0E, 'h00, 0, 0, 'h01},
    '{'h10, 'h80, 0, -1, 0},   '{'h11, 'hA0, 0, -1, 0},   '{'h12, 'h0A, 0, -1, 0},
    '{'h13, 'hA0, 0, -1, 0},   '{'h15, 'hA0, 0, -1, 0},   '{'h16, 'hA8, 0, -1, 0},
    '{'h17, 'hAA, 0, -1, 0},   '{'h18, 'hAA, 0, 0, 'hAA}, '{'h19, 'h55, 0, -1, 0},
    '{'h1B, 'hFF, 0, -1, 0},   '{'h1C, 'hFF, 0, 0, 'hFF},
    '{'h1D, 'hFF, 0, 0, 'h7F}, '{'h1F, 'hFF, 0, 0, 'h3F}, '{'h21, 'hFF, 0, 0, 'h1F},
    '{'h23, 'hFF, 0, 0, 'h0F}, '{'h25, 'hFF, 0, 0, 'h0B}, '{'h27, 'hFF, 0, 0, 'h0A},
    '{'h29, 'h0A, 0, -1, 0},   '{'h2A, 'h0A, 0, 0, 'h0A}, '{'h2B, 'h00, 0, -1, 0},
    '{'h2D, 'h00, 0, -1, 0},   '{'h32, 'h00, 0, -1, 0}
  };

  int n_set = 0, n_clr = 0, n_byte = 0, n_aux = 0, n_jump = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0][7:0] mregs;
    int fetch_pc, cyc;
    logic [7:0] op;
    // Load the memory: zeros, then the program.
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 8'(i); load_data = (i < PLEN) ? prog[i] : 8'h00;
    end
    @(negedge clk);
    load_we = 0;
    rst_n   = 1;
    mregs   = '0;
    check("reset state", state == ST_FETCH && pc == 0 && acc == 0 && regs == '0);

    for (int s = 0; s < NSTEP + 3; s++) begin
      step_t e;
      e = (s < NSTEP) ? exp_steps[s] : exp_steps[NSTEP-1];
      // at a negedge in FETCH
      fetch_pc = pc;
      check($sformatf("step %0d fetch address %02h exp %02h", s, fetch_pc, e.addr),
            state == ST_FETCH && fetch_pc == e.addr);
      cyc = 0;
      do begin
        @(negedge clk);
        cyc++;
      end while (state != ST_FETCH && cyc < 10);
      check($sformatf("step %0d took %0d cycles", s, cyc), cyc == 3);
      if (e.r >= 0) mregs[e.r] = 8'(e.v);
      check($sformatf("step %0d A=%02h exp %02h", s, acc, e.a), acc == 8'(e.a));
      check($sformatf("step %0d C=%b", s, carry), carry == 1'(e.c));
      check($sformatf("step %0d regs=%h exp %h", s, regs, mregs), regs == mregs);
      // Bit instructions: the read port shows the bit just written.
      if (prog[e.addr][7:3] == 5'b11011)
        check($sformatf("step %0d sel_bit=%b", s, sel_bit), sel_bit == prog[e.addr+1][3]);
      // Count the mechanism this instruction exercised, once its results matched.
      if (failures == 0) begin
        op = prog[e.addr];
        if (op[7:3] == 5'b11011 && prog[e.addr+1][3])  n_set++;
        if (op[7:3] == 5'b11011 && !prog[e.addr+1][3]) n_clr++;
        if (op[7:3] == 5'b11111)                        n_byte++;
        if (op == 8'h34 || op == 8'h74 || op == 8'h60 || op == 8'h80 || op[7:3] == 5'b11011)
          n_aux++;
        // A taken jump: the next instruction is not the one after this one.
        if ((op == 8'h60 || op == 8'h80) && int'(pc) != e.addr + 2) n_jump++;
      end
    end

    check($sformatf("bit sets %0d (exp 8)", n_set), n_set == 8);
    check($sformatf("bit clears %0d (exp 6)", n_clr), n_clr == 6);
    check($sformatf("byte writes %0d (exp 3)", n_byte), n_byte == 3);
    check($sformatf("two-byte instructions %0d", n_aux), n_aux > 0);
    check($sformatf("taken jumps %0d", n_jump), n_jump >= 2);
    $display("mechanisms: bit_set=%0d bit_clear=%0d byte_write=%0d two_byte=%0d jump=%0d",
             n_set, n_clr, n_byte, n_aux, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
