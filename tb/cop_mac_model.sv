// cop_mac_model: behavioural model of a passive multiply-accumulate
// coprocessor, used only by testbenches to drive the core's coprocessor
// interface. Not synthesizable design intent; real coprocessors define their
// own command sets.
//
// Registers seen through CLD: 0 = acc[7:0], 1 = acc[15:8], 2 = k (multiplier),
// 3 = ptr (data memory pointer). Commands (cop_cmd[11:8], argument in [7:0]):
//   0 CLR    acc <- 0
//   1 MAC    acc <- acc + DM[ptr] * k, ptr <- ptr + 1   (reads memory in the slot)
//   2 STACC  DM[arg] <- acc[7:0]                        (writes memory in the slot)
//   3 ADDI   acc <- acc + arg
// A command is received in the instruction's ID/MEM cycle, when the model
// also uses the data memory slot; its result is formed in the next (EX)
// cycle and written at the end of it. The status outputs are taken from the
// accumulator value being formed, so a branch right behind a command sees
// its outcome: status[0] = (acc == 0), status[1] = acc[15].
module cop_mac_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [11:0] cmd,
  input  logic        cld_valid,
  input  logic        cld_to_cop,
  input  logic [7:0]  cld_reg,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic [1:0]  status,
  input  logic        slot,
  output logic        mem_en,
  output logic        mem_we,
  output logic [7:0]  mem_addr,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata
);
  logic [15:0] acc, acc_next;
  logic [7:0]  k, ptr;
  logic        ex_valid;
  logic [11:0] ex_cmd;
  logic [7:0]  ex_rd_reg;

  always_comb begin
    acc_next = acc;
    if (ex_valid) begin
      case (ex_cmd[11:8])
        4'd0: acc_next = '0;
        4'd1: acc_next = acc + 16'(mem_rdata) * 16'(k);
        4'd3: acc_next = acc + 16'(ex_cmd[7:0]);
        default: ;
      endcase
    end
  end

  assign status = {acc_next[15], acc_next == 16'd0};

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = ptr;
    mem_wdata = acc_next[7:0];
    if (cmd_valid && cmd[11:8] == 4'd1) mem_en = 1'b1;
    if (cmd_valid && cmd[11:8] == 4'd2) begin
      mem_en   = 1'b1;
      mem_we   = 1'b1;
      mem_addr = cmd[7:0];
    end
  end

  always_comb begin
    case (ex_rd_reg[1:0])
      2'd0: rdata = acc[7:0];
      2'd1: rdata = acc[15:8];
      2'd2: rdata = k;
      default: rdata = ptr;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; k <= '0; ptr <= '0;
      ex_valid <= 1'b0; ex_cmd <= '0; ex_rd_reg <= '0;
    end else begin
      ex_valid  <= cmd_valid;
      ex_cmd    <= cmd;
      ex_rd_reg <= cld_reg;
      acc       <= acc_next;
      if (cmd_valid && cmd[11:8] == 4'd1) ptr <= ptr + 1'b1;
      if (cld_valid && cld_to_cop) begin
        case (cld_reg[1:0])
          2'd0: acc[7:0]  <= wdata;
          2'd1: acc[15:8] <= wdata;
          2'd2: k         <= wdata;
          default: ptr    <= wdata;
        endcase
      end
    end
  end

  a_mem_in_slot: assert property (@(posedge clk) mem_en |-> slot)
    else $error("cop_mac_model: memory access outside the slot");
endmodule
