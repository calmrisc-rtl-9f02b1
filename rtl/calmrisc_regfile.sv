// calmrisc_regfile: general-purpose register file of the core.
//
// NREGS registers of DATA_W bits with two asynchronous read ports, read in
// the ID/MEM stage, and one write port, written at the rising clock edge
// that ends the EX stage. A register read in the same cycle as it is
// written returns the old value; the core bypasses the EX result around
// the file, so no data dependency ever stalls the pipeline.
//
// All registers clear on the asynchronous active-low reset.
//
// Following the description: operands are fetched from the register file
// in ID/MEM and results written back in EX. This design's own: four
// registers, two read ports, the reset.
module calmrisc_regfile #(
  parameter int unsigned NREGS  = 4,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned AW    = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AW-1:0]     ra1,
  output logic [DATA_W-1:0] rd1,
  input  logic [AW-1:0]     ra2,
  output logic [DATA_W-1:0] rd2,
  input  logic              we,
  input  logic [AW-1:0]     wa,
  input  logic [DATA_W-1:0] wd
);
  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
endmodule
