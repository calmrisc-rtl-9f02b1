// calmrisc_core: 8-bit register-memory RISC core with a three-stage pipeline
// and a generic coprocessor interface.
//
// Pipeline (one instruction word per cycle):
//   IF     the PC from the program address generation unit (pagu) addresses
//          the program memory for the whole cycle; the returned word is
//          early-decoded: a jump loads its target into the PC at the end of
//          IF (no penalty), a conditional branch freezes fetch,
//          instructions with a memory operand or destination arm the data
//          address unit (dagu) for the next stage, and a coprocessor
//          instruction is flagged so its command goes out at once in ID/MEM.
//   ID/MEM the word is decoded, register operands are read (with the EX
//          result bypassed in, so data dependencies never stall), dagu forms
//          the data address and the data memory is accessed: a read returns
//          op2 at the edge ending ID/MEM, a store writes at that edge.
//   EX     the ALU computes op1 <- op1 (+) op2; the result and the flags are
//          written back at the end of the cycle.
//
// Conditional branches: there is no prediction. The cycle after a branch is
// fetched is a fetch bubble (program memory disabled) while the branch is in
// ID/MEM. At the end of that cycle the condition is evaluated on the flags
// as the EX instruction of that same cycle leaves them (bypassed) or on the
// coprocessor status inputs, and the PC is loaded with the target or
// incremented past the branch. Each conditional branch therefore costs one
// extra cycle, taken or not.
//
// Coprocessor interface: a coprocessor instruction is fetched and early-
// decoded here; in its ID/MEM cycle the core presents cop_cmd with
// cop_cmd_valid and hands the shared data memory port to the coprocessor
// (cop_slot), making no data access itself. The coprocessor carries out the
// command in that cycle and the next (its ID/MEM and EX). CLD moves one byte
// between a core register and a coprocessor register: to the coprocessor,
// cop_wdata is valid with cop_cld_valid in the ID/MEM cycle; from the
// coprocessor, the coprocessor must drive cop_rdata during the following
// (EX) cycle and the byte is written back to rd at its end. A branch on
// cop_status samples the inputs at the end of its ID/MEM cycle.
//
// Reset (rst_n, asynchronous, active low) clears the PC to 0, the registers,
// the flags and the pipeline.
//
// Following the description: the three stages and their work, early
// decoding in IF, address calculation in ID/MEM, the conditional-branch
// stall without prediction, no data-dependency stall, the generic
// coprocessor instructions with the coprocessor doing ID/MEM and EX, the
// shared data memory used in cycles the core designates, CLD, and branches
// on coprocessor status inputs. This design's own: the instruction encoding
// (calmrisc_pkg), the jump taken at the end of IF, the exact cycles of the
// CLD and status signals, and all widths other than 8-bit data and the
// 12-bit PC.
module calmrisc_core
  import calmrisc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // program memory
  output logic [PC_W-1:0]         imem_addr,
  output logic                    imem_en,
  input  logic [INSN_W-1:0]       imem_rdata,
  // shared data memory, core side
  output logic                    dm_en,
  output logic                    dm_we,
  output logic [DADDR_W-1:0]      dm_addr,
  output logic [DATA_W-1:0]       dm_wdata,
  input  logic [DATA_W-1:0]       dm_rdata,
  output logic                    cop_slot,
  // coprocessor interface
  output logic                    cop_cmd_valid,
  output logic [11:0]             cop_cmd,
  output logic                    cop_cld_valid,
  output logic                    cop_cld_to_cop,
  output logic [7:0]              cop_cld_reg,
  output logic [DATA_W-1:0]       cop_wdata,
  input  logic [DATA_W-1:0]       cop_rdata,
  input  logic [COP_STATUS_W-1:0] cop_status
);

  // ---------------------------------------------------------------- IF
  logic      br_wait;        // a conditional branch is in ID/MEM
  insn_t     if_insn;
  logic      if_jmp, if_br, if_mem, if_cop;
  logic [PC_W-1:0] pc;
  logic      pc_hold, pc_load;
  logic [PC_W-1:0] pc_target;
  logic      br_taken;

  assign if_insn   = insn_t'(imem_rdata);
  assign imem_en   = ~br_wait;
  assign imem_addr = pc;

  always_comb begin
    if_jmp = (if_insn.op == OP_JMP);
    if_br  = (if_insn.op == OP_BR);
    if_cop = (if_insn.op == OP_COP);
    unique case (if_insn.op)
      OP_ALU_M, OP_ALU_X, OP_ST, OP_STX: if_mem = 1'b1;
      default:                           if_mem = 1'b0;
    endcase
  end

  // ------------------------------------------------------- pipeline regs
  logic       id_valid, id_calc, id_cop_q;
  insn_t      id_insn;

  logic              ex_valid;
  alu_fn_e           ex_fn;
  logic [REG_AW-1:0] ex_rd;
  logic [DATA_W-1:0] ex_a, ex_b;
  logic              ex_b_mem;    // op2 is the data memory read data
  logic              ex_we;       // writes rd
  logic              ex_flag_we;  // ALU instruction, updates flags
  logic              ex_from_cop; // CLD from the coprocessor

  flags_t            flags_q, alu_flags, flags_next;
  logic [DATA_W-1:0] alu_y, ex_result;

  // ------------------------------------------------------------ ID/MEM
  logic [DATA_W-1:0] rf_rd1, rf_rd2, rd_val, rs_val;
  logic              byp_rd, byp_rs;
  logic              id_indexed, id_store, id_cop, id_cld;
  logic [DADDR_W-1:0] dagu_addr;

  calmrisc_regfile #(.NREGS(NREGS), .DATA_W(DATA_W)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (id_insn.rd),
    .rd1   (rf_rd1),
    .ra2   (id_insn.rs),
    .rd2   (rf_rd2),
    .we    (ex_valid & ex_we),
    .wa    (ex_rd),
    .wd    (ex_result)
  );

  // EX-to-ID/MEM bypass: the instruction in EX writes back at the end of
  // this cycle, so its result is forwarded to the operand reads.
  assign byp_rd = ex_valid & ex_we & (ex_rd == id_insn.rd);
  assign byp_rs = ex_valid & ex_we & (ex_rd == id_insn.rs);
  assign rd_val = byp_rd ? ex_result : rf_rd1;
  assign rs_val = byp_rs ? ex_result : rf_rd2;

  assign id_indexed = (id_insn.op == OP_ALU_X) || (id_insn.op == OP_STX);
  assign id_store   = (id_insn.op == OP_ST)    || (id_insn.op == OP_STX);
  assign id_cop     = id_valid && id_cop_q;
  assign id_cld     = id_valid && (id_insn.op == OP_CLD);

  dagu #(.ADDR_W(DADDR_W), .OFF_W(8)) u_dagu (
    .calc   (id_valid & id_calc),
    .base   (id_indexed ? DADDR_W'(rs_val) : '0),
    .offset (id_insn.imm[7:0]),
    .addr   (dagu_addr)
  );

  assign dm_en    = id_valid & id_calc;
  assign dm_we    = id_valid & id_calc & id_store;
  assign dm_addr  = dagu_addr;
  assign dm_wdata = rd_val;
  assign cop_slot = id_cop;

  assign cop_cmd_valid  = id_cop;
  assign cop_cmd        = id_insn.imm;
  assign cop_cld_valid  = id_cld;
  assign cop_cld_to_cop = id_insn.fn[0];
  assign cop_cld_reg    = id_insn.imm[7:0];
  assign cop_wdata      = rd_val;

  // Branch resolution at the end of the branch's ID/MEM cycle.
  always_comb begin
    unique case (cond_e'(id_insn.fn))
      CC_Z:    br_taken = flags_next.z;
      CC_NZ:   br_taken = ~flags_next.z;
      CC_C:    br_taken = flags_next.c;
      CC_NC:   br_taken = ~flags_next.c;
      CC_CS0:  br_taken = cop_status[0];
      CC_NCS0: br_taken = ~cop_status[0];
      CC_CS1:  br_taken = cop_status[1];
      default: br_taken = ~cop_status[1];
    endcase
  end

  // Next-PC control for pagu.
  always_comb begin
    pc_load   = 1'b0;
    pc_hold   = 1'b0;
    pc_target = if_insn.imm[PC_W-1:0];
    if (br_wait) begin
      pc_load   = br_taken;
      pc_target = id_insn.imm[PC_W-1:0];
    end else if (if_jmp) begin
      pc_load   = 1'b1;
    end else if (if_br) begin
      pc_hold   = 1'b1;
    end
  end

  pagu #(.PC_W(PC_W), .M(3)) u_pagu (
    .clk    (clk),
    .rst_n  (rst_n),
    .hold   (pc_hold),
    .load   (pc_load),
    .target (pc_target),
    .pc     (pc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_wait  <= 1'b0;
      id_valid <= 1'b0;
      id_calc  <= 1'b0;
      id_cop_q <= 1'b0;
      id_insn  <= '0;
    end else begin
      br_wait  <= ~br_wait & if_br;
      id_valid <= ~br_wait;
      id_calc  <= ~br_wait & if_mem;
      id_cop_q <= ~br_wait & if_cop;
      if (!br_wait) id_insn <= if_insn;
    end
  end

  // ID/MEM -> EX register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid    <= 1'b0;
      ex_fn       <= FN_ADD;
      ex_rd       <= '0;
      ex_a        <= '0;
      ex_b        <= '0;
      ex_b_mem    <= 1'b0;
      ex_we       <= 1'b0;
      ex_flag_we  <= 1'b0;
      ex_from_cop <= 1'b0;
    end else begin
      ex_valid    <= id_valid;
      ex_fn       <= alu_fn_e'(id_insn.fn);
      ex_rd       <= id_insn.rd;
      ex_a        <= rd_val;
      ex_b        <= (id_insn.op == OP_ALU_I) ? id_insn.imm[DATA_W-1:0] : rs_val;
      ex_b_mem    <= (id_insn.op == OP_ALU_M) || (id_insn.op == OP_ALU_X);
      unique case (id_insn.op)
        OP_ALU_R, OP_ALU_I, OP_ALU_M, OP_ALU_X: begin
          ex_we       <= 1'b1;
          ex_flag_we  <= 1'b1;
          ex_from_cop <= 1'b0;
        end
        OP_CLD: begin
          ex_we       <= ~id_insn.fn[0];
          ex_flag_we  <= 1'b0;
          ex_from_cop <= ~id_insn.fn[0];
        end
        default: begin
          ex_we       <= 1'b0;
          ex_flag_we  <= 1'b0;
          ex_from_cop <= 1'b0;
        end
      endcase
    end
  end

  // ---------------------------------------------------------------- EX
  calmrisc_alu u_alu (
    .fn        (ex_fn),
    .a         (ex_a),
    .b         (ex_b_mem ? dm_rdata : ex_b),
    .flags_in  (flags_q),
    .y         (alu_y),
    .flags_out (alu_flags)
  );

  assign ex_result  = ex_from_cop ? cop_rdata : alu_y;
  assign flags_next = (ex_valid & ex_flag_we) ? alu_flags : flags_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags_q <= '0;
    else        flags_q <= flags_next;
  end

  // A conditional branch is never followed by a fetched word in ID/MEM.
  a_bubble_after_branch: assert property (@(posedge clk) disable iff (!rst_n)
      br_wait |=> !id_valid)
    else $error("calmrisc_core: instruction issued behind a branch");

endmodule
