// calmrisc_alu: 8-bit ALU of the EX stage.
//
// Computes op1 (+) op2 for the register-memory instruction form
// op1 <- op1 (+) op2: add and subtract with and without carry, and, or,
// xor, and move (result = op2, which is a load when op2 comes from data
// memory). Purely combinational; the result is written back to the
// register file at the end of the EX cycle by the core.
//
// Flags: Z is set when the result is zero and is updated by every
// operation. C is the carry out of the adder; subtraction is done as
// a + ~b + 1 (a + ~b + c with carry), so C = 1 means "no borrow". Logic
// operations and move leave C unchanged.
//
// Following the description: an ALU in EX evaluating op1 (+) op2 on 8-bit
// data. This design's own: the operation set and the flags.
module calmrisc_alu
  import calmrisc_pkg::*;
(
  input  alu_fn_e             fn,
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  input  flags_t              flags_in,
  output logic [DATA_W-1:0]   y,
  output flags_t              flags_out
);
  logic [DATA_W:0] sum;

  always_comb begin
    sum = '0;
    flags_out.c = flags_in.c;
    unique case (fn)
      FN_ADD: sum = {1'b0, a} + {1'b0, b};
      FN_ADC: sum = {1'b0, a} + {1'b0, b} + (DATA_W+1)'(flags_in.c);
      FN_SUB: sum = {1'b0, a} + {1'b0, ~b} + (DATA_W+1)'(1);
      FN_SBC: sum = {1'b0, a} + {1'b0, ~b} + (DATA_W+1)'(flags_in.c);
      default: sum = '0;
    endcase
    unique case (fn)
      FN_ADD, FN_ADC, FN_SUB, FN_SBC: begin
        y           = sum[DATA_W-1:0];
        flags_out.c = sum[DATA_W];
      end
      FN_AND:  y = a & b;
      FN_OR:   y = a | b;
      FN_XOR:  y = a ^ b;
      default: y = b;  // FN_MOV
    endcase
    flags_out.z = (y == '0);
  end
endmodule
