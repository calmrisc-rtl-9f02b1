// tb_calmrisc_soc: end-to-end test of the chip top.
//
// The testbench holds the program ROM (a behavioural array answering within
// the IF cycle) and a multiply-accumulate coprocessor model (cop_mac_model)
// wired to the top's coprocessor and shared-memory ports. It loads a program
// made of three parts:
//   1. the eight operations of the code-size comparison for register-memory
//      machines (M1 = M1 + M2, ..., R1 = R2 + R3), each in its 2- or
//      3-instruction form;
//   2. a loop that sums a byte array with indexed addressing, a 16-bit
//      carry chain (ADC) and a conditional branch back;
//   3. a dot product run by the coprocessor from the shared data memory,
//      with CLD transfers both ways and a loop closed by a branch on a
//      coprocessor status input.
// The same program is executed by an instruction-level reference model
// written in this testbench (no pipeline, one instruction at a time,
// coprocessor included). At the end the registers, flags, all of data
// memory and the accumulator must match the model, and the number of cycles
// until the final self-jump is fetched must equal the executed instruction
// count plus one stall cycle per conditional branch.
// Each mechanism of the pipeline is counted and must have happened at least
// once: branch stall (taken and not taken), jump, EX bypass, coprocessor
// memory slot (read and write), CLD in both directions, branch on a
// coprocessor status, gated PAGU clock, and DAGU latches kept closed.
module tb_calmrisc_soc;
  import calmrisc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  // Assert the asynchronous reset with a falling edge shortly after time 0.
  initial #1 rst_n = 1'b0;
  logic [PC_W-1:0]         imem_addr;
  logic                    imem_en;
  logic [INSN_W-1:0]       imem_rdata;
  logic                    cop_cmd_valid, cop_cld_valid, cop_cld_to_cop, cop_slot;
  logic [11:0]             cop_cmd;
  logic [7:0]              cop_cld_reg;
  logic [DATA_W-1:0]       cop_wdata, cop_rdata;
  logic [COP_STATUS_W-1:0] cop_status;
  logic                    cop_mem_en, cop_mem_we;
  logic [DADDR_W-1:0]      cop_mem_addr;
  logic [DATA_W-1:0]       cop_mem_wdata, cop_mem_rdata;

  calmrisc_soc dut (.*);

  cop_mac_model u_cop (
    .clk(clk), .rst_n(rst_n),
    .cmd_valid(cop_cmd_valid), .cmd(cop_cmd),
    .cld_valid(cop_cld_valid), .cld_to_cop(cop_cld_to_cop), .cld_reg(cop_cld_reg),
    .wdata(cop_wdata), .rdata(cop_rdata), .status(cop_status),
    .slot(cop_slot), .mem_en(cop_mem_en), .mem_we(cop_mem_we),
    .mem_addr(cop_mem_addr), .mem_wdata(cop_mem_wdata), .mem_rdata(cop_mem_rdata)
  );

  always #5 clk = ~clk;

  insn_t rom [1 << PC_W];
  assign imem_rdata = rom[imem_addr];

  int checks = 0, failures = 0;
  int pc_asm = 0;

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

  // ------------------------------------------------ reference model
  logic [7:0]  m_r [NREGS];
  flags_t      m_f;
  logic [7:0]  m_dm [1 << DADDR_W];
  logic [15:0] m_acc;
  logic [7:0]  m_k, m_ptr;
  int          m_instr, m_condbr;

  function automatic void m_alu(input logic [2:0] fn, input int rd, input logic [7:0] b);
    logic [8:0] s;
    logic [7:0] a, y;
    a = m_r[rd];
    case (alu_fn_e'(fn))
      FN_ADD: begin s = {1'b0, a} + {1'b0, b};           y = s[7:0]; m_f.c = s[8]; end
      FN_ADC: begin s = {1'b0, a} + {1'b0, b} + 9'(m_f.c); y = s[7:0]; m_f.c = s[8]; end
      FN_SUB: begin s = {1'b0, a} - {1'b0, b};           y = s[7:0]; m_f.c = ~s[8]; end
      FN_SBC: begin s = {1'b0, a} - {1'b0, b} - 9'(!m_f.c); y = s[7:0]; m_f.c = ~s[8]; end
      FN_AND: y = a & b;
      FN_OR:  y = a | b;
      FN_XOR: y = a ^ b;
      default: y = b;
    endcase
    m_f.z = (y == 0);
    m_r[rd] = y;
  endfunction

  function automatic int model_run(input int halt);
    int pc = 0;
    m_instr = 0;
    m_condbr = 0;
    while (pc != halt) begin
      insn_t i;
      bit taken;
      logic [1:0] st;
      i = rom[pc];
      m_instr++;
      pc = (pc + 1) % (1 << PC_W);
      case (i.op)
        OP_ALU_R: m_alu(i.fn, int'(i.rd), m_r[i.rs]);
        OP_ALU_I: m_alu(i.fn, int'(i.rd), i.imm[7:0]);
        OP_ALU_M: m_alu(i.fn, int'(i.rd), m_dm[i.imm[7:0]]);
        OP_ALU_X: m_alu(i.fn, int'(i.rd), m_dm[8'(m_r[i.rs] + i.imm[7:0])]);
        OP_ST:    m_dm[i.imm[7:0]] = m_r[i.rd];
        OP_STX:   m_dm[8'(m_r[i.rs] + i.imm[7:0])] = m_r[i.rd];
        OP_JMP:   pc = int'(i.imm);
        OP_BR: begin
          m_condbr++;
          st = {m_acc[15], m_acc == 0};
          case (cond_e'(i.fn))
            CC_Z:    taken = m_f.z;
            CC_NZ:   taken = !m_f.z;
            CC_C:    taken = m_f.c;
            CC_NC:   taken = !m_f.c;
            CC_CS0:  taken = st[0];
            CC_NCS0: taken = !st[0];
            CC_CS1:  taken = st[1];
            default: taken = !st[1];
          endcase
          if (taken) pc = int'(i.imm);
        end
        OP_COP: begin
          case (i.imm[11:8])
            4'd0: m_acc = 0;
            4'd1: begin m_acc = m_acc + 16'(m_dm[m_ptr]) * 16'(m_k); m_ptr++; end
            4'd2: m_dm[i.imm[7:0]] = m_acc[7:0];
            4'd3: m_acc = m_acc + 16'(i.imm[7:0]);
            default: ;
          endcase
        end
        OP_CLD: begin
          if (i.fn[0]) begin
            case (i.imm[1:0])
              2'd0: m_acc[7:0]  = m_r[i.rd];
              2'd1: m_acc[15:8] = m_r[i.rd];
              2'd2: m_k         = m_r[i.rd];
              default: m_ptr    = m_r[i.rd];
            endcase
          end else begin
            case (i.imm[1:0])
              2'd0: m_r[i.rd] = m_acc[7:0];
              2'd1: m_r[i.rd] = m_acc[15:8];
              2'd2: m_r[i.rd] = m_k;
              default: m_r[i.rd] = m_ptr;
            endcase
          end
        end
        default: ;
      endcase
    end
    return m_instr;  // instructions executed before the halt word
  endfunction

  // ------------------------------------------------ mechanism counters
  int n_stall, n_taken, n_not_taken, n_jump, n_bypass, n_slot_rd, n_slot_wr;
  int n_cld_to, n_cld_from, n_status_br, n_hi_clk, n_dagu_closed, n_indexed;
  int cycles = 0, halt_cycle = -1, halt_addr;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_core.br_wait) begin
      n_stall++;
      if (dut.u_core.br_taken) n_taken++; else n_not_taken++;
      if (dut.u_core.id_insn.fn >= 3'd4) n_status_br++;
    end
    if (imem_en && rom[imem_addr].op == OP_JMP && rom[imem_addr].imm != 12'(imem_addr)) n_jump++;
    if (dut.u_core.id_valid && (dut.u_core.byp_rd || dut.u_core.byp_rs)) n_bypass++;
    if (cop_slot && cop_mem_en && !cop_mem_we) n_slot_rd++;
    if (cop_slot && cop_mem_en && cop_mem_we) n_slot_wr++;
    if (cop_cld_valid && cop_cld_to_cop) n_cld_to++;
    if (cop_cld_valid && !cop_cld_to_cop) n_cld_from++;
    if (dut.u_core.id_valid && !dut.u_core.id_calc) n_dagu_closed++;
    if (dut.u_core.id_valid && dut.u_core.id_calc && dut.u_core.id_indexed) n_indexed++;
    if (halt_cycle < 0 && imem_en && int'(imem_addr) == halt_addr) halt_cycle = cycles - 1;
  end
  always @(posedge dut.u_core.u_pagu.hi_clk) if (rst_n) n_hi_clk++;

  // ------------------------------------------------ program
  localparam int M1 = 'h40, M2 = 'h41, M3 = 'h42;

  task automatic build_program();
    // Part 1: the eight register-memory operations (op1 <- op1 + op2).
    int base;
    for (int t = 0; t < 8; t++) begin
      int m1, m2, m3;
      m1 = 'h40 + 4 * t; m2 = m1 + 1; m3 = m1 + 2;
      base = pc_asm;
      case (t)
        0: begin // M1 = M1 + M2
          emit(mk(OP_ALU_M, FN_MOV, 0, 0, m1));
          emit(mk(OP_ALU_M, FN_ADD, 0, 0, m2));
          emit(mk(OP_ST,    0,      0, 0, m1));
        end
        1: begin // M1 = M2 + M3
          emit(mk(OP_ALU_M, FN_MOV, 0, 0, m2));
          emit(mk(OP_ALU_M, FN_ADD, 0, 0, m3));
          emit(mk(OP_ST,    0,      0, 0, m1));
        end
        2: begin // M1 = M1 + R1
          emit(mk(OP_ALU_M, FN_ADD, 1, 0, m1));
          emit(mk(OP_ST,    0,      1, 0, m1));
        end
        3: begin // M1 = M2 + R1
          emit(mk(OP_ALU_M, FN_ADD, 1, 0, m2));
          emit(mk(OP_ST,    0,      1, 0, m1));
        end
        4: begin // R1 = M1 + M2
          emit(mk(OP_ALU_M, FN_MOV, 1, 0, m1));
          emit(mk(OP_ALU_M, FN_ADD, 1, 0, m2));
        end
        5: begin // M1 = R1 + R2
          emit(mk(OP_ALU_R, FN_ADD, 1, 2, 0));
          emit(mk(OP_ST,    0,      1, 0, m1));
        end
        6: begin // R1 = R2 + M1
          emit(mk(OP_ALU_R, FN_MOV, 1, 2, 0));
          emit(mk(OP_ALU_M, FN_ADD, 1, 0, m1));
        end
        default: begin // R1 = R2 + R3
          emit(mk(OP_ALU_R, FN_MOV, 1, 2, 0));
          emit(mk(OP_ALU_R, FN_ADD, 1, 3, 0));
        end
      endcase
      check(pc_asm - base == ((t < 2) ? 3 : 2),
            $sformatf("operation %0d takes %0d instructions", t, pc_asm - base));
      emit(mk(OP_ALU_I, FN_ADD, 2, 0, 7));   // vary R2 between operations
    end
    // Part 2: 16-bit sum of the 16 bytes at 0x80..0x8F into R2:R3.
    emit(mk(OP_ALU_I, FN_MOV, 0, 0, 16));   // R0 = count / index
    emit(mk(OP_ALU_I, FN_MOV, 2, 0, 0));
    emit(mk(OP_ALU_I, FN_MOV, 3, 0, 0));
    begin
      int loop = pc_asm;
      emit(mk(OP_ALU_X, FN_ADD, 2, 0, 'h7F));  // R2 += DM[R0 + 0x7F]
      emit(mk(OP_ALU_I, FN_ADC, 3, 0, 0));     // R3 += carry
      emit(mk(OP_ALU_I, FN_SUB, 0, 0, 1));
      emit(mk(OP_BR,    CC_NZ, 0, 0, loop));
    end
    emit(mk(OP_JMP, 0, 0, 0, pc_asm + 2));  // jump over one word
    emit(mk(OP_ALU_I, FN_MOV, 2, 0, 'hEE));  // skipped
    emit(mk(OP_STX, 0, 2, 1, 0));            // DM[R1] = low sum
    emit(mk(OP_ST,  0, 3, 0, 'hF1));
    // Part 3: dot product of 0xA0.. with k = 3 on the coprocessor, stopping
    // when the accumulator goes negative (bit 15) or after 8 terms.
    emit(mk(OP_COP, 0, 0, 0, 'h000));        // CLR
    emit(mk(OP_ALU_I, FN_MOV, 0, 0, 3));
    emit(mk(OP_CLD, 1, 0, 0, 2));            // k = 3
    emit(mk(OP_ALU_I, FN_MOV, 0, 0, 'hA0));
    emit(mk(OP_CLD, 1, 0, 0, 3));            // ptr = 0xA0
    emit(mk(OP_ALU_I, FN_MOV, 1, 0, 8));
    begin
      int loop = pc_asm;
      int done = loop + 4;
      emit(mk(OP_COP, 0, 0, 0, 'h100));      // MAC
      emit(mk(OP_BR,  CC_CS1, 0, 0, done));  // stop on negative accumulator
      emit(mk(OP_ALU_I, FN_SUB, 1, 0, 1));
      emit(mk(OP_BR,  CC_NZ, 0, 0, loop));
    end
    emit(mk(OP_COP, 0, 0, 0, 'h2F0));        // DM[F0] = acc low
    emit(mk(OP_CLD, 0, 2, 0, 0));            // R2 = acc low
    emit(mk(OP_CLD, 0, 3, 0, 1));            // R3 = acc high
    emit(mk(OP_COP, 0, 0, 0, 'h305));        // acc += 5
    emit(mk(OP_BR,  CC_NCS0, 0, 0, pc_asm + 2)); // acc != 0: taken
    emit(mk(OP_ALU_I, FN_MOV, 0, 0, 'hEE));  // skipped
    emit(mk(OP_ST, 0, 1, 0, 'hF2));
    halt_addr = pc_asm;
    emit(mk(OP_JMP, 0, 0, 0, halt_addr));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_instr, expect_cycle;
    for (int i = 0; i < (1 << PC_W); i++) rom[i] = mk(OP_NOP, 0, 0, 0, 0);
    for (int i = 0; i < (1 << DADDR_W); i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      if (i >= 'hA0 && i < 'hA8) v = 8'($urandom_range(0, 200)) | ((i == 'hA6) ? 8'hF0 : 8'h00);
      dut.u_dmem.mem[i] = v;
      m_dm[i] = v;
    end
    for (int i = 0; i < int'(NREGS); i++) m_r[i] = '0;
    m_f = '0; m_acc = '0; m_k = '0; m_ptr = '0;
    build_program();
    expect_instr = model_run(halt_addr);
    expect_cycle = expect_instr + m_condbr;

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (halt_cycle >= 0);
    repeat (4) @(posedge clk);
    #1;
    check(halt_cycle == expect_cycle,
          $sformatf("halt fetched in cycle %0d, expected %0d", halt_cycle, expect_cycle));
    for (int i = 0; i < int'(NREGS); i++)
      check(dut.u_core.u_rf.regs[i] == m_r[i],
            $sformatf("R%0d = %h, expected %h", i, dut.u_core.u_rf.regs[i], m_r[i]));
    check(dut.u_core.flags_q == m_f, "flags");
    for (int i = 0; i < (1 << DADDR_W); i++)
      check(dut.u_dmem.mem[i] == m_dm[i],
            $sformatf("DM[%h] = %h, expected %h", i, dut.u_dmem.mem[i], m_dm[i]));
    check(u_cop.acc == m_acc, $sformatf("acc = %h, expected %h", u_cop.acc, m_acc));

    $display("instructions %0d, conditional branches %0d, cycles %0d, CPI %0.3f",
             expect_instr, m_condbr, halt_cycle, real'(halt_cycle) / real'(expect_instr));
    $display("stalls %0d (taken %0d, not taken %0d), jumps %0d, bypasses %0d",
             n_stall, n_taken, n_not_taken, n_jump, n_bypass);
    $display("cop slot reads %0d writes %0d, CLD to %0d from %0d, status branches %0d",
             n_slot_rd, n_slot_wr, n_cld_to, n_cld_from, n_status_br);
    $display("gated PC clock edges %0d, DAGU idle %0d, indexed %0d",
             n_hi_clk, n_dagu_closed, n_indexed);
    check(n_stall == m_condbr, "one stall cycle per conditional branch");
    check(n_taken > 0, "taken branch");
    check(n_not_taken > 0, "not-taken branch");
    check(n_jump > 0, "jump");
    check(n_bypass > 0, "bypass");
    check(n_slot_rd > 0, "coprocessor memory read in slot");
    check(n_slot_wr > 0, "coprocessor memory write in slot");
    check(n_cld_to > 0, "CLD to coprocessor");
    check(n_cld_from > 0, "CLD from coprocessor");
    check(n_status_br > 0, "branch on coprocessor status");
    check(n_hi_clk > 0, "gated PC clock");
    check(n_dagu_closed > 0, "DAGU latches closed");
    check(n_indexed > 0, "indexed address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
