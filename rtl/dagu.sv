// dagu: data address generation unit with selective input latching.
//
// The data address is base + offset, computed by one adder. Both adder
// inputs pass through level-sensitive latches that are transparent only
// while `calc` is high. When an instruction needs no data address, `calc`
// is low, the latches stay closed, and whatever the register file and the
// instruction register do on the base and offset inputs does not reach the
// adder, so the adder does not switch and `addr` keeps its last value.
//
// Interface: `calc` comes from the ID/MEM pipeline register (set by the
// early decoder in IF for instructions with a memory operand or a memory
// destination), so it is stable for the whole cycle; `addr` is valid
// combinationally in the same cycle, for the data memory access of ID/MEM.
// Direct addressing is base = 0 plus an 8-bit address; indexed addressing
// is a register plus an 8-bit offset, wrapping modulo 2**ADDR_W.
//
// Following the description: the DAGU adder, its input latches loaded only
// when an address calculation is required, and the calculation in ID/MEM.
// This design's own: the widths, the two addressing modes and that the
// offset is zero-extended. The two latches are intended.
module dagu #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned OFF_W  = 8
) (
  input  logic              calc,
  input  logic [ADDR_W-1:0] base,
  input  logic [OFF_W-1:0]  offset,
  output logic [ADDR_W-1:0] addr
);
  logic [ADDR_W-1:0] base_l;
  logic [OFF_W-1:0]  off_l;

  always_latch begin
    if (calc) begin
      base_l = base;
      off_l  = offset;
    end
  end

  assign addr = base_l + ADDR_W'(off_l);
endmodule
