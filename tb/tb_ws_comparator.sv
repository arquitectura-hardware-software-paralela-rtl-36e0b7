// tb_ws_comparator: exhaustive test of the compare/swap decision: swap only
// when the left symbol is larger and the control bit does not block.
module tb_ws_comparator;
  import bwtlz_pkg::*;
  sym_t l, r; logic block, swap;
  int checks = 0, failures = 0;
  ws_comparator dut (.left_sym(l), .right_sym(r), .block, .swap);
  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b += 3)
        for (int c = 0; c < 2; c++) begin
          l = sym_t'(a); r = sym_t'(b); block = c[0];
          #1;
          checks++;
          if (swap !== (c == 0 && a > b)) begin
            failures++;
            if (failures < 5) $display("FAIL l=%0d r=%0d block=%0d swap=%0d", a, b, c, swap);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
