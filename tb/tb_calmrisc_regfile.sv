// tb_calmrisc_regfile: self-checking test of the register file.
//
// Checks that reset clears every register, then performs random writes and
// reads on both ports against a reference array, including reads of the
// register being written in the same cycle (these return the old value).
module tb_calmrisc_regfile;
  localparam int unsigned NREGS = 4;
  localparam int unsigned DW    = 8;
  localparam int unsigned AW    = 2;

  logic          clk = 1'b0, rst_n = 1'b1;
  // Assert the asynchronous reset with a falling edge shortly after time 0.
  initial #1 rst_n = 1'b0;
  logic [AW-1:0] ra1 = '0, ra2 = '0, wa = '0;
  logic [DW-1:0] rd1, rd2, wd = '0;
  logic          we = 1'b0;
  logic [DW-1:0] refr [NREGS];
  int checks = 0, failures = 0;

  calmrisc_regfile #(.NREGS(NREGS), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NREGS); i++) refr[i] = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < int'(NREGS); i++) begin
      ra1 = AW'(i); #1;
      checks++;
      if (rd1 !== '0) begin failures++; $display("FAIL reset r%0d=%h", i, rd1); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 1) == 1);
      wa  = AW'($urandom);
      wd  = DW'($urandom);
      ra1 = AW'($urandom);
      ra2 = (i % 4 == 0) ? wa : AW'($urandom);
      #1;
      checks += 2;
      if (rd1 !== refr[ra1]) begin failures++; $display("FAIL rd1 r%0d=%h exp %h", ra1, rd1, refr[ra1]); end
      if (rd2 !== refr[ra2]) begin failures++; $display("FAIL rd2 r%0d=%h exp %h", ra2, rd2, refr[ra2]); end
      @(posedge clk);
      if (we) refr[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
