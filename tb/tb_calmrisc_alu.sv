// tb_calmrisc_alu: self-checking test of the ALU.
//
// Applies every operation to corner and random operands with both carry-in
// values and compares result, Z and C with a reference written here from
// the operation definitions (C = carry out of a + b, or of a + ~b + 1 for
// subtraction; logic operations and move keep C).
module tb_calmrisc_alu;
  import calmrisc_pkg::*;

  alu_fn_e           fn;
  logic [DATA_W-1:0] a, b, y;
  flags_t            fi, fo;
  int checks = 0, failures = 0;

  calmrisc_alu dut (.fn(fn), .a(a), .b(b), .flags_in(fi), .y(y), .flags_out(fo));

  function automatic void model(input alu_fn_e f, input int x, input int w, input flags_t fin,
                                output int r, output flags_t fout);
    int s;
    fout = fin;
    case (f)
      FN_ADD: begin s = x + w;               r = s & 255; fout.c = (s > 255); end
      FN_ADC: begin s = x + w + int'(fin.c); r = s & 255; fout.c = (s > 255); end
      FN_SUB: begin r = (x - w) & 255;                fout.c = (x >= w); end
      FN_SBC: begin r = (x - w - 1 + int'(fin.c)) & 255; fout.c = (x - w - 1 + int'(fin.c) >= 0); end
      FN_AND: r = x & w;
      FN_OR:  r = x | w;
      FN_XOR: r = x ^ w;
      default: r = w;
    endcase
    fout.z = (r == 0);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int r;
      flags_t fe;
      fn = alu_fn_e'(i % 8);
      if (i < 64) begin
        a = (i & 8)  ? 8'hFF : ((i & 16) ? 8'h80 : 8'h00);
        b = (i & 32) ? 8'hFF : 8'h01;
      end else begin
        a = 8'($urandom);
        b = 8'($urandom);
      end
      fi = flags_t'($urandom_range(0, 3));
      #1;
      model(fn, int'(a), int'(b), fi, r, fe);
      checks++;
      if (int'(y) != r || fo != fe) begin
        failures++;
        $display("FAIL fn=%s a=%h b=%h c=%0b: y=%h zc=%b expected %h %b",
                 fn.name(), a, b, fi.c, y, fo, r[7:0], fe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
