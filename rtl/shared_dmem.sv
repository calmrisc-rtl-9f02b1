// shared_dmem: the single data memory shared by the core and a coprocessor.
//
// A single-port synchronous RAM (one access per cycle, read data registered
// at the clock edge) with two request ports. The core owns the port except
// in cycles where it raises `cop_slot`; in those cycles the coprocessor's
// request is served instead. The core raises `cop_slot` only in the ID/MEM
// cycle of a coprocessor instruction, where it makes no data access itself,
// so the two never contend and no arbiter is needed. The assertions state
// that rule: the core does not request during a slot and the coprocessor
// does not request outside one.
//
// Timing: address, enable, write enable and write data are presented during
// a cycle; a write takes effect at the rising edge ending it, and a read
// returns its data on `rdata` from that edge until the next access.
//
// Following the description: one data memory shared through cycles the core
// designates, with no contention. This design's own: the size, the
// synchronous single-port organisation and the slot signal.
module shared_dmem #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              cop_slot,
  // core port
  input  logic              c_en,
  input  logic              c_we,
  input  logic [AW-1:0]     c_addr,
  input  logic [DATA_W-1:0] c_wdata,
  // coprocessor port
  input  logic              p_en,
  input  logic              p_we,
  input  logic [AW-1:0]     p_addr,
  input  logic [DATA_W-1:0] p_wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];
  logic              en, we;
  logic [AW-1:0]     addr;
  logic [DATA_W-1:0] wdata;

  always_comb begin
    if (cop_slot) begin
      en = p_en; we = p_we; addr = p_addr; wdata = p_wdata;
    end else begin
      en = c_en; we = c_we; addr = c_addr; wdata = c_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  a_core_not_in_slot: assert property (@(posedge clk) cop_slot |-> !c_en)
    else $error("shared_dmem: core access during a coprocessor slot");
  a_cop_only_in_slot: assert property (@(posedge clk) !cop_slot |-> !p_en)
    else $error("shared_dmem: coprocessor access outside its slot");
endmodule
