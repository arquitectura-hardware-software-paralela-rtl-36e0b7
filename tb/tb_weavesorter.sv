// tb_weavesorter: the Weavesorter machine on its own (64 cells).
// Sorting: a string of m symbols (one group) is shifted in from the left with
// a compare/swap after every shift; it must then leave from the left end in
// ascending order while a second string enters from the right (a control bit
// at its first symbol keeps the two apart), and that second string must leave
// from the right end in descending order. Each string phase must take 2m
// cycles. Done must be low with groups present and high once a column of
// all-separated symbols has been inserted. Addresses must travel with their
// symbols. Search: with the control bits cleared and symbols shifted in from
// the right, found[] must flag exactly the valid cells equal to Search.
module tb_weavesorter;
  import bwtlz_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n;
  ws_op_e op; logic dir_right, ctrl_in, ctrl_load, ctrl_load_val, ctrl_out, done;
  sym_t in_sym, search, out_sym; logic [5:0] in_addr, out_addr; logic [N-1:0] found;
  int checks = 0, failures = 0;

  weavesorter #(.N(N)) dut (.clk, .rst_n, .op, .dir_right, .in_sym, .in_addr, .ctrl_in, .ctrl_load,
    .ctrl_load_val, .search, .out_sym, .out_addr, .ctrl_out, .done, .found);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic step(input ws_op_e o);
    op = o; @(posedge clk); #1 op = WS_HOLD;
  endtask

  task automatic sort_test(input int m);
    byte unsigned a[$], b[$], sa[$], sb[$];
    int t0, cyc;
    for (int i = 0; i < m; i++) begin a.push_back($urandom_range(97, 105)); b.push_back($urandom_range(97, 122)); end
    sa = a; sa.sort(); sb = b; sb.rsort();
    ctrl_load = 1; ctrl_load_val = 1; @(posedge clk); #1 ctrl_load = 0;
    dir_right = 1;
    t0 = $time;
    for (int k = 0; k < m; k++) begin
      in_sym = a[k]; in_addr = 6'(k); ctrl_in = (k == 0);
      step(WS_SHIFT_R); step(WS_CMP);
    end
    cyc = ($time - t0) / 10;
    chk(cyc == 2*m, $sformatf("phase took %0d cycles", cyc));
    chk(!done || m == 1, "Done high while a group is unsorted");
    dir_right = 0; #1;
    for (int k = 0; k < m; k++) begin
      chk(out_sym == sa[k], $sformatf("m=%0d ascending out %0d: %h expected %h", m, k, out_sym, sa[k]));
      chk(a[out_addr] == out_sym, "address does not travel with its symbol");
      in_sym = b[k]; in_addr = 6'(k); ctrl_in = (k == 0);
      step(WS_SHIFT_L); step(WS_CMP);
    end
    dir_right = 1; #1;
    for (int k = 0; k < m; k++) begin
      chk(out_sym == sb[k], $sformatf("m=%0d descending out %0d: %h expected %h", m, k, out_sym, sb[k]));
      chk(b[out_addr] == out_sym, "address does not travel with its symbol (second string)");
      in_sym = 8'(k); in_addr = 6'(k); ctrl_in = 1;     // all separated
      step(WS_SHIFT_R); step(WS_CMP);
    end
    chk(done, "Done low after an all-separated column");
  endtask

  initial begin
    byte unsigned dict[$];
    rst_n = 0; op = WS_HOLD; dir_right = 1; ctrl_in = 0; ctrl_load = 0; ctrl_load_val = 0;
    in_sym = 0; in_addr = 0; search = 0;
    @(posedge clk); #1 rst_n = 1;
    sort_test(64);
    sort_test(20);
    sort_test(64);
    // Search / Found
    ctrl_load = 1; ctrl_load_val = 0; @(posedge clk); #1 ctrl_load = 0;
    dict = {};
    for (int k = 0; k < 90; k++) begin
      logic [N-1:0] e;
      search = $urandom_range(97, 100);
      e = '0;
      for (int i = 0; i < dict.size(); i++) if (dict[dict.size()-1-i] == search) e[N-1-i] = 1'b1;
      #1;
      chk(found == e, $sformatf("found %h expected %h", found, e));
      in_sym = search; ctrl_in = 1;
      step(WS_SHIFT_L);
      dict.push_back(search);
      if (dict.size() > N) void'(dict.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
