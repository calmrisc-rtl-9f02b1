// tb_dagu: self-checking test of the data address unit.
//
// With calc high the address must equal base + offset (mod 2**ADDR_W) for
// random operands. With calc low the inputs are changed at random and the
// address must keep the value of the last calculation, showing that the
// input latches block the changes from the adder.
module tb_dagu;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned OFF_W  = 8;

  logic              calc = 1'b0;
  logic [ADDR_W-1:0] base = '0;
  logic [OFF_W-1:0]  offset = '0;
  logic [ADDR_W-1:0] addr;
  logic [ADDR_W-1:0] last;
  int checks = 0, failures = 0;

  dagu #(.ADDR_W(ADDR_W), .OFF_W(OFF_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last = '0;
    for (int i = 0; i < 2000; i++) begin
      calc   = ($urandom_range(0, 2) != 0);
      base   = ADDR_W'($urandom);
      offset = OFF_W'($urandom);
      #1;
      if (calc) last = ADDR_W'(base + offset);
      #1;
      checks++;
      if (addr !== last) begin
        failures++;
        $display("FAIL calc=%0b base=%h off=%h addr=%h expected %h", calc, base, offset, addr, last);
      end
      calc = 1'b0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
