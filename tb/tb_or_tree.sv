// tb_or_tree: the OR tree against the reduction OR, for 64 inputs (zero, one
// hot at every position, random sparse vectors) and for a 5-input tree.
module tb_or_tree;
  logic [63:0] x; logic y;
  logic [4:0] x5; logic y5;
  int checks = 0, failures = 0;
  or_tree #(.N(64)) dut (.x, .y);
  or_tree #(.N(5)) dut5 (.x(x5), .y(y5));
  initial begin
    for (int t = 0; t < 600; t++) begin
      if (t == 0) x = '0;
      else if (t <= 64) x = 64'd1 << (t - 1);
      else x = ($urandom_range(1) ? 64'($urandom) & 64'($urandom) : 64'd0) << $urandom_range(40);
      x5 = 5'(t);
      #1;
      checks += 2;
      if (y !== (|x)) begin failures++; $display("FAIL x=%h y=%b", x, y); end
      if (y5 !== (|x5)) begin failures++; $display("FAIL x5=%b y5=%b", x5, y5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
