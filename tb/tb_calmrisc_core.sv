// tb_calmrisc_core: cycle-level test of the core's pipeline.
//
// A short hand-written program exercises back-to-back dependencies (served
// by the EX bypass), a taken and a not-taken conditional branch, a jump,
// direct and indexed memory operands, a store followed by a load of the same
// byte, a coprocessor command and both CLD directions. The testbench holds
// the program memory and a one-cycle synchronous data memory, and plays the
// coprocessor by hand. It checks, cycle by cycle, the sequence of fetch
// addresses against the expected one (a branch costs exactly one bubble, a
// jump none), the cycle in which each coprocessor signal appears, and the
// final registers and memory.
module tb_calmrisc_core;
  import calmrisc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  // Assert the asynchronous reset with a falling edge shortly after time 0.
  initial #1 rst_n = 1'b0;
  logic [PC_W-1:0]         imem_addr;
  logic                    imem_en;
  logic [INSN_W-1:0]       imem_rdata;
  logic                    dm_en, dm_we, cop_slot;
  logic [DADDR_W-1:0]      dm_addr;
  logic [DATA_W-1:0]       dm_wdata, dm_rdata;
  logic                    cop_cmd_valid, cop_cld_valid, cop_cld_to_cop;
  logic [11:0]             cop_cmd;
  logic [7:0]              cop_cld_reg;
  logic [DATA_W-1:0]       cop_wdata, cop_rdata;
  logic [COP_STATUS_W-1:0] cop_status;

  insn_t             rom [1 << PC_W];
  logic [DATA_W-1:0] dmem [1 << DADDR_W];
  int checks = 0, failures = 0;
  int cycle = 0;

  calmrisc_core dut (.*);

  always #5 clk = ~clk;

  assign imem_rdata = rom[imem_addr];
  always_ff @(posedge clk) begin
    if (dm_en && !cop_slot) begin
      if (dm_we) dmem[dm_addr] <= dm_wdata;
      else       dm_rdata      <= dmem[dm_addr];
    end
  end

  // Coprocessor played by hand: it answers a CLD read with 8'h5A in the
  // CLD's EX cycle.
  logic cld_rd_q;
  always_ff @(posedge clk) cld_rd_q <= cop_cld_valid & ~cop_cld_to_cop;
  assign cop_rdata  = cld_rd_q ? 8'h5A : 8'h00;
  assign cop_status = 2'b00;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Expected fetch sequence; -1 is a bubble (program memory disabled).
  int exp_fetch [] = '{0, 1, 2, 3, 4, -1, 7, 8, 9, 10, -1, 11, 'h30, 'h31, 'h32, 'h33, 'h34, 'h34};
  int cop_cmd_cycle = -1, cld_wr_cycle = -1, cld_rd_cycle = -1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << PC_W); i++) rom[i] = mk(OP_NOP, 0, 0, 0, 0);
    for (int i = 0; i < (1 << DADDR_W); i++) dmem[i] = '0;
    dm_rdata = '0;
    rom['h00] = mk(OP_ALU_I, FN_MOV, 0, 0, 5);
    rom['h01] = mk(OP_ALU_I, FN_ADD, 0, 0, 3);      // R0 = 8, needs bypass
    rom['h02] = mk(OP_ALU_R, FN_MOV, 1, 0, 0);      // R1 = R0 = 8, bypass on rs
    rom['h03] = mk(OP_ALU_I, FN_SUB, 1, 0, 8);      // R1 = 0, Z = 1
    rom['h04] = mk(OP_BR,    CC_Z,   0, 0, 'h07);   // taken
    rom['h05] = mk(OP_ALU_I, FN_MOV, 2, 0, 'hEE);   // skipped
    rom['h06] = mk(OP_ALU_I, FN_MOV, 2, 0, 'hEE);   // skipped
    rom['h07] = mk(OP_ST,    0,      0, 0, 'h10);   // DM[10] = 8
    rom['h08] = mk(OP_ALU_M, FN_MOV, 3, 0, 'h10);   // R3 = 8
    rom['h09] = mk(OP_ALU_X, FN_ADD, 3, 0, 'h08);   // R3 += DM[R0 + 8] = 16
    rom['h0A] = mk(OP_BR,    CC_Z,   0, 0, 'h20);   // not taken
    rom['h0B] = mk(OP_JMP,   0,      0, 0, 'h30);
    rom['h0C] = mk(OP_ALU_I, FN_MOV, 2, 0, 'hEE);   // skipped
    rom['h30] = mk(OP_COP,   0,      0, 0, 'h123);
    rom['h31] = mk(OP_CLD,   1,      3, 0, 'h05);   // cop reg 5 <- R3
    rom['h32] = mk(OP_CLD,   0,      2, 0, 'h07);   // R2 <- cop reg 7
    rom['h33] = mk(OP_ALU_R, FN_ADD, 2, 2, 0);      // R2 = 2 * 5A, bypass
    rom['h34] = mk(OP_JMP,   0,      0, 0, 'h34);   // stay

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    for (cycle = 0; cycle < exp_fetch.size() + 2; cycle++) begin
      if (cycle > 0) @(negedge clk);
      if (cycle < exp_fetch.size()) begin
        if (exp_fetch[cycle] < 0)
          check(!imem_en, $sformatf("bubble expected, fetch at %h", imem_addr));
        else
          check(imem_en && int'(imem_addr) == exp_fetch[cycle],
                $sformatf("fetch %h (en %0b), expected %h", imem_addr, imem_en, exp_fetch[cycle]));
      end
      if (cop_cmd_valid) begin
        cop_cmd_cycle = cycle;
        check(cop_cmd == 12'h123, "coprocessor command");
        check(cop_slot && !dm_en, "memory slot not handed over");
      end
      if (cop_cld_valid && cop_cld_to_cop) begin
        cld_wr_cycle = cycle;
        check(cop_cld_reg == 8'h05 && cop_wdata == 8'd16, "CLD to coprocessor data");
      end
      if (cop_cld_valid && !cop_cld_to_cop) begin
        cld_rd_cycle = cycle;
        check(cop_cld_reg == 8'h07, "CLD from coprocessor register");
      end
      if (cycle == 7) check(dm_en && dm_we && dm_addr == 8'h10 && dm_wdata == 8'd8, "store in ID/MEM");
      if (cycle == 9) check(dm_en && !dm_we && dm_addr == 8'h10, "indexed address");
    end
    // The coprocessor instruction is fetched in cycle 12, so its ID/MEM
    // cycle is 13; the CLDs follow one cycle apart.
    check(cop_cmd_cycle == 13, $sformatf("cop command in cycle %0d", cop_cmd_cycle));
    check(cld_wr_cycle == 14, $sformatf("CLD write in cycle %0d", cld_wr_cycle));
    check(cld_rd_cycle == 15, $sformatf("CLD read in cycle %0d", cld_rd_cycle));
    check(dut.u_rf.regs[0] == 8'd8,  "R0");
    check(dut.u_rf.regs[1] == 8'd0,  "R1");
    check(dut.u_rf.regs[2] == 8'hB4, "R2");
    check(dut.u_rf.regs[3] == 8'd16, "R3");
    check(dmem['h10] == 8'd8, "DM[10]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
