// pagu: program address generation unit.
//
// Holds the program counter and advances it with a ripple-carry
// incrementer built from a chain of half adders. The clocks of the M low
// bits toggle every cycle; the remaining PC_W-M high bits sit behind a
// clock gate that opens only when the carry out of the M-th half adder is 1
// (or when a jump target is loaded), so the high bits are clocked on one
// increment in 2**M. With the published numbers (a 12-bit incrementer,
// M = 3) the high nine flip-flops see one clock edge in eight increments.
//
// Interface: on each rising clk edge the PC is loaded with `target` when
// `load` is high, else it is held when `hold` is high, else it is
// incremented (wrapping at 2**PC_W). `pc` is the address of the
// instruction being fetched. rst_n is asynchronous and clears the PC.
//
// Following the description: the 12-bit ripple-carry incrementer, the
// choice of M = 3 and the gating of the high bits by the M-th carry. This
// design's own: the load and hold controls, the reset value 0, and that a
// held PC keeps the low bits with a multiplexer rather than a second gate.
// The gate cell contains an intended latch (see clock_gate).
module pagu #(
  parameter int unsigned PC_W = 12,
  parameter int unsigned M    = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hold,
  input  logic            load,
  input  logic [PC_W-1:0] target,
  output logic [PC_W-1:0] pc
);
  logic [PC_W:0]   carry;      // carry[i] enters half adder i
  logic [PC_W-1:0] sum;
  logic            hi_en;
  logic            hi_clk;
  logic [M-1:0]    lo_q;
  logic [PC_W-1:M] hi_q;

  // Ripple chain of half adders with a constant carry-in of 1. The high
  // half adders only ever compute an increment when the gate is open,
  // which happens when carry[M] is 1.
  assign carry[0] = 1'b1;
  for (genvar i = 0; i < int'(PC_W); i++) begin : g_half_adder
    assign sum[i]     = pc[i] ^ carry[i];
    assign carry[i+1] = pc[i] & carry[i];
  end

  assign hi_en = load | (~hold & carry[M]);

  clock_gate u_hi_gate (.clk(clk), .en(hi_en), .gclk(hi_clk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      lo_q <= '0;
    else if (load)   lo_q <= target[M-1:0];
    else if (!hold)  lo_q <= sum[M-1:0];
  end

  always_ff @(posedge hi_clk or negedge rst_n) begin
    if (!rst_n)    hi_q <= '0;
    else if (load) hi_q <= target[PC_W-1:M];
    else           hi_q <= sum[PC_W-1:M];
  end

  assign pc = {hi_q, lo_q};
endmodule
