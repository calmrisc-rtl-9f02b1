// calmrisc_soc: CalmRISC core with its shared data memory.
//
// The chip-level view of the architecture: a Harvard microcontroller core
// that fetches from a program memory (a ROM outside this module) and shares
// one data memory with a passive coprocessor (also outside). The core
// decides in which cycles the coprocessor owns the data memory port
// (cop_slot, the ID/MEM cycle of a coprocessor instruction), so the
// coprocessor reaches memory at its own width of access per cycle without
// any arbitration or contention. The only direct data path between the two
// processors is the CLD register transfer.
//
// Ports: the program memory port (imem_*: address and fetch enable out,
// instruction word in, read combinationally within the IF cycle); the
// coprocessor command, CLD and status signals (cop_*, see calmrisc_core);
// and the coprocessor's data-memory request port (cop_mem_*), whose read
// data is the shared memory's registered output, valid from the edge that
// ends the slot.
//
// Following the description: the core, the single shared data memory and
// the designated-cycle sharing. This design's own: the 256-byte data memory
// and the signal names.
module calmrisc_soc
  import calmrisc_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic [PC_W-1:0]         imem_addr,
  output logic                    imem_en,
  input  logic [INSN_W-1:0]       imem_rdata,
  output logic                    cop_cmd_valid,
  output logic [11:0]             cop_cmd,
  output logic                    cop_cld_valid,
  output logic                    cop_cld_to_cop,
  output logic [7:0]              cop_cld_reg,
  output logic [DATA_W-1:0]       cop_wdata,
  input  logic [DATA_W-1:0]       cop_rdata,
  input  logic [COP_STATUS_W-1:0] cop_status,
  output logic                    cop_slot,
  input  logic                    cop_mem_en,
  input  logic                    cop_mem_we,
  input  logic [DADDR_W-1:0]      cop_mem_addr,
  input  logic [DATA_W-1:0]       cop_mem_wdata,
  output logic [DATA_W-1:0]       cop_mem_rdata
);
  logic                dm_en, dm_we;
  logic [DADDR_W-1:0]  dm_addr;
  logic [DATA_W-1:0]   dm_wdata, dm_rdata;

  calmrisc_core u_core (
    .clk            (clk),
    .rst_n          (rst_n),
    .imem_addr      (imem_addr),
    .imem_en        (imem_en),
    .imem_rdata     (imem_rdata),
    .dm_en          (dm_en),
    .dm_we          (dm_we),
    .dm_addr        (dm_addr),
    .dm_wdata       (dm_wdata),
    .dm_rdata       (dm_rdata),
    .cop_slot       (cop_slot),
    .cop_cmd_valid  (cop_cmd_valid),
    .cop_cmd        (cop_cmd),
    .cop_cld_valid  (cop_cld_valid),
    .cop_cld_to_cop (cop_cld_to_cop),
    .cop_cld_reg    (cop_cld_reg),
    .cop_wdata      (cop_wdata),
    .cop_rdata      (cop_rdata),
    .cop_status     (cop_status)
  );

  shared_dmem #(.DEPTH(DMEM_DEPTH), .DATA_W(DATA_W)) u_dmem (
    .clk      (clk),
    .cop_slot (cop_slot),
    .c_en     (dm_en),
    .c_we     (dm_we),
    .c_addr   ($clog2(DMEM_DEPTH)'(dm_addr)),
    .c_wdata  (dm_wdata),
    .p_en     (cop_mem_en),
    .p_we     (cop_mem_we),
    .p_addr   ($clog2(DMEM_DEPTH)'(cop_mem_addr)),
    .p_wdata  (cop_mem_wdata),
    .rdata    (dm_rdata)
  );

  assign cop_mem_rdata = dm_rdata;
endmodule
