// tb_pagu: self-checking test of the program address generation unit.
//
// Drives a mix of increments, holds and target loads and compares the PC
// after every edge with a reference counter kept in the testbench. It also
// counts rising edges of the gated clock of the high bits: during a run of
// pure increments these must come exactly once per 2**M increments (one in
// eight for the 12-bit, M = 3 unit), which is the point of the gating.
module tb_pagu;
  localparam int unsigned PC_W = 12;
  localparam int unsigned M    = 3;

  logic            clk = 1'b0;
  logic            rst_n = 1'b1;
  // Assert the asynchronous reset with a falling edge shortly after time 0.
  initial #1 rst_n = 1'b0;
  logic            hold = 1'b0, load = 1'b0;
  logic [PC_W-1:0] target = '0;
  logic [PC_W-1:0] pc;
  logic [PC_W-1:0] ref_pc;
  int checks = 0, failures = 0;
  int hi_edges = 0;

  pagu #(.PC_W(PC_W), .M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge dut.hi_clk) if (rst_n) hi_edges++;

  task automatic step(input logic h, input logic l, input logic [PC_W-1:0] t);
    hold = h; load = l; target = t;
    @(posedge clk);
    if (l)       ref_pc = t;
    else if (!h) ref_pc = ref_pc + 1'b1;
    #1;
    checks++;
    if (pc !== ref_pc) begin
      failures++;
      $display("FAIL pc=%h expected %h (hold=%0b load=%0b)", pc, ref_pc, h, l);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_pc = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pc !== '0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst_n = 1'b1;
    // Full wrap-around by increments only; count the gated high clock.
    hi_edges = 0;
    for (int i = 0; i < (1 << PC_W); i++) step(1'b0, 1'b0, '0);
    checks++;
    if (hi_edges != (1 << (PC_W - M))) begin
      failures++;
      $display("FAIL gated clock edges %0d, expected %0d", hi_edges, 1 << (PC_W - M));
    end
    // Holds, including on a carry boundary.
    step(1'b1, 1'b0, '0);
    step(1'b0, 1'b1, 12'h0F7);
    for (int i = 0; i < 3; i++) step(1'b1, 1'b0, '0);
    for (int i = 0; i < 20; i++) step(1'b0, 1'b0, '0);
    // Random mix.
    for (int i = 0; i < 5000; i++) begin
      int r;
      r = int'($urandom_range(0, 9));
      step(r == 0, r == 1, PC_W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
