// tb_shared_dmem: self-checking test of the shared data memory.
//
// Runs random cycles in which either the core (no slot) or the coprocessor
// (slot) reads or writes, while the other side drives random requests that
// must be ignored, and compares every read with a reference array. Data
// written by one side is thus read back by the other.
module tb_shared_dmem;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned DW    = 8;
  localparam int unsigned AW    = 8;

  logic          clk = 1'b0, cop_slot = 1'b0;
  logic          c_en = 1'b0, c_we = 1'b0, p_en = 1'b0, p_we = 1'b0;
  logic [AW-1:0] c_addr = '0, p_addr = '0;
  logic [DW-1:0] c_wdata = '0, p_wdata = '0, rdata;
  logic [DW-1:0] refm [DEPTH];
  int checks = 0, failures = 0;

  shared_dmem #(.DEPTH(DEPTH), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill through the core port.
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      c_en = 1'b1; c_we = 1'b1; c_addr = AW'(i); c_wdata = DW'($urandom); refm[i] = c_wdata;
    end
    for (int i = 0; i < 8000; i++) begin
      logic slot, en, we;
      logic [AW-1:0] a;
      logic [DW-1:0] d;
      @(negedge clk);
      slot = ($urandom_range(0, 1) == 1);
      en   = ($urandom_range(0, 3) != 0);
      we   = ($urandom_range(0, 1) == 1);
      a    = AW'($urandom);
      d    = DW'($urandom);
      cop_slot = slot;
      // The side that owns the port issues the access; the other is idle.
      if (slot) begin
        p_en = en; p_we = we; p_addr = a; p_wdata = d;
        c_en = 1'b0; c_we = 1'b1; c_addr = AW'($urandom); c_wdata = DW'($urandom);
      end else begin
        c_en = en; c_we = we; c_addr = a; c_wdata = d;
        p_en = 1'b0; p_we = 1'b1; p_addr = AW'($urandom); p_wdata = DW'($urandom);
      end
      @(posedge clk);
      #1;
      if (en && we) refm[a] = d;
      if (en && !we) begin
        checks++;
        if (rdata !== refm[a]) begin
          failures++;
          $display("FAIL slot=%0b read [%h]=%h expected %h", slot, a, rdata, refm[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
