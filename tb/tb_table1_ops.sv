// tb_table1_ops: the eight sample operations of the code-size comparison
// between instruction-set styles, run on the register-memory core.
//
// For each operation (M1 = M1 + M2, M1 = M2 + M3, M1 = M1 + R1,
// M1 = M2 + R1, R1 = M1 + M2, M1 = R1 + R2, R1 = R2 + M1, R1 = R2 + R3)
// the testbench loads R1..R3 with fresh values (setup, not counted), emits
// the operation in its shortest register-memory form and then saves R1 to a
// scratch byte (not counted). It checks:
//   * the instruction count of each operation: 3, 3, 2, 2, 2, 2, 2, 2,
//     averaging 18 / 8 = 2.25 instructions;
//   * every result byte, computed here directly from the operand values;
//   * that the straight-line program runs at exactly one instruction per
//     cycle (no stalls without conditional branches).
// The coprocessor ports are idle.
module tb_table1_ops;
  import calmrisc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  // Assert the asynchronous reset with a falling edge shortly after time 0.
  initial #1 rst_n = 1'b0;

  logic [PC_W-1:0]   imem_addr;
  logic              imem_en;
  logic [INSN_W-1:0] imem_rdata;
  logic              cop_cmd_valid, cop_cld_valid, cop_cld_to_cop, cop_slot;
  logic [11:0]       cop_cmd;
  logic [7:0]        cop_cld_reg, cop_wdata, cop_mem_rdata;

  calmrisc_soc dut (
    .clk(clk), .rst_n(rst_n),
    .imem_addr(imem_addr), .imem_en(imem_en), .imem_rdata(imem_rdata),
    .cop_cmd_valid(cop_cmd_valid), .cop_cmd(cop_cmd),
    .cop_cld_valid(cop_cld_valid), .cop_cld_to_cop(cop_cld_to_cop),
    .cop_cld_reg(cop_cld_reg), .cop_wdata(cop_wdata),
    .cop_rdata(8'h00), .cop_status(2'b00), .cop_slot(cop_slot),
    .cop_mem_en(1'b0), .cop_mem_we(1'b0), .cop_mem_addr(8'h00),
    .cop_mem_wdata(8'h00), .cop_mem_rdata(cop_mem_rdata)
  );

  always #5 clk = ~clk;

  insn_t rom [1 << PC_W];
  assign imem_rdata = rom[imem_addr];

  int checks = 0, failures = 0;
  int pc_asm = 0;
  int table_count [8] = '{3, 3, 2, 2, 2, 2, 2, 2};
  logic [7:0] init_dm [256];
  logic [7:0] exp_byte [256];
  bit         exp_valid [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic void emit(insn_t i);
    rom[pc_asm] = i;
    pc_asm++;
  endfunction

  int cycles = 0, halt_cycle = -1, halt_addr = -1;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (halt_cycle < 0 && imem_en && int'(imem_addr) == halt_addr) halt_cycle = cycles - 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0;
    for (int i = 0; i < (1 << PC_W); i++) rom[i] = mk(OP_NOP, 0, 0, 0, 0);
    for (int i = 0; i < 256; i++) begin
      init_dm[i] = 8'($urandom);
      dut.u_dmem.mem[i] = init_dm[i];
      exp_valid[i] = 1'b0;
    end
    for (int t = 0; t < 8; t++) begin
      int m1, m2, m3, base, n;
      logic [7:0] r1, r2, r3, vm1, vm2, vm3, res, r1_after;
      m1 = 'h40 + 4 * t; m2 = m1 + 1; m3 = m1 + 2;
      vm1 = init_dm[m1]; vm2 = init_dm[m2]; vm3 = init_dm[m3];
      r1 = 8'($urandom); r2 = 8'($urandom); r3 = 8'($urandom);
      emit(mk(OP_ALU_I, FN_MOV, 1, 0, r1));
      emit(mk(OP_ALU_I, FN_MOV, 2, 0, r2));
      emit(mk(OP_ALU_I, FN_MOV, 3, 0, r3));
      base = pc_asm;
      r1_after = r1;
      case (t)
        0: begin emit(mk(OP_ALU_M, FN_MOV, 0, 0, m1)); emit(mk(OP_ALU_M, FN_ADD, 0, 0, m2));
                 emit(mk(OP_ST, 0, 0, 0, m1)); res = vm1 + vm2; end
        1: begin emit(mk(OP_ALU_M, FN_MOV, 0, 0, m2)); emit(mk(OP_ALU_M, FN_ADD, 0, 0, m3));
                 emit(mk(OP_ST, 0, 0, 0, m1)); res = vm2 + vm3; end
        2: begin emit(mk(OP_ALU_M, FN_ADD, 1, 0, m1)); emit(mk(OP_ST, 0, 1, 0, m1));
                 res = vm1 + r1; r1_after = res; end
        3: begin emit(mk(OP_ALU_M, FN_ADD, 1, 0, m2)); emit(mk(OP_ST, 0, 1, 0, m1));
                 res = vm2 + r1; r1_after = res; end
        4: begin emit(mk(OP_ALU_M, FN_MOV, 1, 0, m1)); emit(mk(OP_ALU_M, FN_ADD, 1, 0, m2));
                 res = vm1; r1_after = vm1 + vm2; end
        5: begin emit(mk(OP_ALU_R, FN_ADD, 1, 2, 0)); emit(mk(OP_ST, 0, 1, 0, m1));
                 res = r1 + r2; r1_after = res; end
        6: begin emit(mk(OP_ALU_R, FN_MOV, 1, 2, 0)); emit(mk(OP_ALU_M, FN_ADD, 1, 0, m1));
                 res = vm1; r1_after = r2 + vm1; end
        default: begin emit(mk(OP_ALU_R, FN_MOV, 1, 2, 0)); emit(mk(OP_ALU_R, FN_ADD, 1, 3, 0));
                 res = vm1; r1_after = r2 + r3; end
      endcase
      n = pc_asm - base;
      total += n;
      check(n == table_count[t], $sformatf("operation %0d: %0d instructions, expected %0d", t, n, table_count[t]));
      emit(mk(OP_ST, 0, 1, 0, 'h80 + t));
      exp_byte[m1] = res;            exp_valid[m1] = 1'b1;
      exp_byte['h80 + t] = r1_after; exp_valid['h80 + t] = 1'b1;
    end
    check(total == 18, $sformatf("total %0d instructions (average %0.2f)", total, real'(total) / 8.0));
    halt_addr = pc_asm;
    emit(mk(OP_JMP, 0, 0, 0, halt_addr));

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (halt_cycle >= 0);
    repeat (4) @(posedge clk);
    #1;
    check(halt_cycle == halt_addr,
          $sformatf("halt fetched in cycle %0d, expected %0d (CPI 1)", halt_cycle, halt_addr));
    for (int i = 0; i < 256; i++)
      if (exp_valid[i])
        check(dut.u_dmem.mem[i] == exp_byte[i],
              $sformatf("DM[%h] = %h, expected %h", i, dut.u_dmem.mem[i], exp_byte[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
