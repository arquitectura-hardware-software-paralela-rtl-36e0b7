// tb_ws_cell: unit test of one Weavesorter cell. Random operations (hold,
// shift right, shift left, compare/swap with and without a swap request) are
// applied and the stored symbol/address compared with a model kept here; the
// combinational Found output is checked against Search and valid.
module tb_ws_cell;
  import bwtlz_pkg::*;
  logic clk = 0, rst_n;
  ws_op_e op;
  sym_t ls, rs, ss, search, sym;
  logic [5:0] la, ra, sa, addr;
  logic swap, valid, found;
  int checks = 0, failures = 0;
  sym_t e_sym; logic [5:0] e_addr;

  ws_cell #(.AW(6)) dut (.clk, .rst_n, .op, .left_sym(ls), .left_addr(la), .right_sym(rs),
    .right_addr(ra), .swap, .swap_sym(ss), .swap_addr(sa), .search, .valid, .sym, .addr, .found);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rst_n = 0; op = WS_HOLD; {ls, rs, ss, search, la, ra, sa, swap, valid} = '0;
    @(posedge clk); #1 rst_n = 1;
    e_sym = 0; e_addr = 0;
    for (int t = 0; t < 2000; t++) begin
      op = ws_op_e'($urandom_range(3));
      ls = $urandom; rs = $urandom; ss = $urandom; la = $urandom; ra = $urandom; sa = $urandom;
      swap = $urandom; valid = $urandom;
      search = ($urandom_range(3) == 0) ? sym : sym_t'($urandom);
      #1;
      checks++;
      if (found !== (valid && sym == search)) begin failures++; $display("found mismatch"); end
      case (op)
        WS_SHIFT_R: begin e_sym = ls; e_addr = la; end
        WS_SHIFT_L: begin e_sym = rs; e_addr = ra; end
        WS_CMP: if (swap) begin e_sym = ss; e_addr = sa; end
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (sym !== e_sym || addr !== e_addr) begin failures++; $display("t=%0d op=%0d cell %h/%h expected %h/%h", t, op, sym, addr, e_sym, e_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
