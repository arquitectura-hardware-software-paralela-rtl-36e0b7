// tb_ws_control: the control unit operating a real Weavesorter, block register,
// token generator and result buffer, with commands driven directly.
// BWT: random blocks (m = 16, 33, 64) and the example "_she_sells_sea_shells";
// the result buffer must hold the last column of the sorted rotations, the
// index output the row of the original string, phases the predicted count,
// and the run must take exactly 1 + 2*m*phases + m cycles from the command to
// op_done. The state sequence must begin Reset, ShiftRight, CompareSwap and
// pass through ShiftLeft and GetResults. LZ77: a block must take one cycle per
// symbol and leave the reference token count. A reset command must abort a
// run and return to Reset.
module tb_ws_control;
  import bwtlz_pkg::*;
  localparam int N = 64, AW = 6, CW = 7;
  logic clk = 0, rst_n;
  logic cmd_bwt, cmd_lz, cmd_reset, lz_new, lz_last, busy, op_done;
  logic [CW-1:0] cmd_len, tok_count, block_len, phases;
  ctl_state_e state;
  ws_op_e ws_op; logic ws_dir_right, ws_ctrl_in, ws_ctrl_load, ws_ctrl_load_val, ws_ctrl_out, ws_done;
  sym_t ws_in_sym, ws_out_sym, rd_sym; logic [AW-1:0] ws_in_addr, ws_out_addr, rd_addr;
  logic tg_clear, tg_step, tg_force, tg_tok_valid, tg_matched; token_t tg_token;
  logic res_we; logic [AW-1:0] res_addr, bwt_index, grp; logic [31:0] res_data;
  logic [N-1:0] found; logic [63:0] syms, tokens;
  logic mem_we; logic [AW-1:0] mem_wbase; logic [127:0] mem_wdata;
  int checks = 0, failures = 0;
  int seen_sr = 0, seen_sl = 0, seen_cs = 0, seen_gr = 0, seen_lz = 0;

  ws_control #(.N(N)) dut (.*, .busy, .op_done, .state);
  weavesorter #(.N(N)) u_ws (.clk, .rst_n, .op(ws_op), .dir_right(ws_dir_right), .in_sym(ws_in_sym),
    .in_addr(ws_in_addr), .ctrl_in(ws_ctrl_in), .ctrl_load(ws_ctrl_load), .ctrl_load_val(ws_ctrl_load_val),
    .search(rd_sym), .out_sym(ws_out_sym), .out_addr(ws_out_addr), .ctrl_out(ws_ctrl_out), .done(ws_done), .found);
  block_mem #(.N(N)) u_mem (.clk, .wr_en(mem_we), .wr_base(mem_wbase), .wr_data(mem_wdata), .rd_addr, .rd_sym);
  lz77_token_gen #(.N(N)) u_tg (.clk, .rst_n, .clear(tg_clear), .step(tg_step), .force_emit(tg_force),
    .sym(rd_sym), .found, .matched(tg_matched), .tok_valid(tg_tok_valid), .token(tg_token));
  result_buf #(.N(N)) u_res (.clk, .rst_n, .we(res_we), .waddr(res_addr), .wdata(res_data), .grp, .syms, .tokens);

  always #5 clk = ~clk;
  initial begin repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    case (state)
      ST_SHIFT_RIGHT: seen_sr++;
      ST_SHIFT_LEFT: seen_sl++;
      ST_COMPARE_SWAP: seen_cs++;
      ST_GET_RESULTS: seen_gr++;
      ST_LZ77: seen_lz++;
      default: ;
    endcase
  end

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load(input byte unsigned s[$]);
    for (int g = 0; g * 16 < s.size(); g++) begin
      mem_wdata = '0;
      for (int j = 0; j < 16; j++) if (g*16 + j < s.size()) mem_wdata[(15-j)*8 +: 8] = s[g*16+j];
      mem_wbase = AW'(g*16); mem_we = 1;
      @(posedge clk); #1 mem_we = 0;
    end
  endtask

  function automatic bit rot_less(input byte unsigned s[$], input int a, input int b, output int lcp);
    int m = s.size();
    lcp = 0;
    for (int t = 0; t < m; t++) begin
      if (s[(a+t)%m] != s[(b+t)%m]) return s[(a+t)%m] < s[(b+t)%m];
      lcp++;
    end
    return 0;
  endfunction

  task automatic run_bwt(input byte unsigned s[$], input string name);
    int m = s.size(), order[$], D = 1, P, I, lcp, tmp, cyc;
    for (int a = 0; a < m; a++) order.push_back(a);
    for (int i = 1; i < m; i++)
      for (int j = i; j > 0 && rot_less(s, order[j], order[j-1], lcp); j--) begin
        tmp = order[j]; order[j] = order[j-1]; order[j-1] = tmp;
      end
    for (int r = 0; r < m; r++) begin
      if (order[r] == 0) I = r;
      if (r > 0) begin void'(rot_less(s, order[r-1], order[r], lcp)); if (lcp + 1 > D) D = lcp + 1; end
    end
    P = (D + 1 < 2) ? 2 : (D + 1 > m + 1) ? m + 1 : D + 1;
    load(s);
    cmd_len = CW'(m); cmd_bwt = 1;
    @(posedge clk); #1 cmd_bwt = 0;
    chk(state == ST_SHIFT_RIGHT, $sformatf("%s: Reset must lead to ShiftRight", name));
    cyc = 1;
    while (!op_done) begin @(posedge clk); #1 cyc++; if (cyc == 2) chk(state == ST_COMPARE_SWAP, "ShiftRight must lead to Compare/Swap"); end

    chk(cyc == 1 + 2*m*P + m, $sformatf("%s: %0d cycles, expected %0d", name, cyc, 1 + 2*m*P + m));
    chk(state == ST_RESET, "back in Reset");
    chk(phases == CW'(P), $sformatf("%s: phases %0d expected %0d", name, phases, P));
    chk(bwt_index == AW'(I), $sformatf("%s: index %0d expected %0d", name, bwt_index, I));
    for (int r = 0; r < m; r++) begin
      grp = AW'(r / 8); #1;
      chk(syms[(7 - r % 8)*8 +: 8] == s[(order[r] + m - 1) % m], $sformatf("%s: L[%0d]", name, r));
    end
  endtask

  initial begin
    byte unsigned s[$];
    string ex = "_she_sells_sea_shells";
    int cyc;
    rst_n = 0; {cmd_bwt, cmd_lz, cmd_reset, lz_new, lz_last, mem_we} = '0; cmd_len = '0;
    mem_wbase = '0; mem_wdata = '0; grp = '0;
    @(posedge clk); #1 rst_n = 1;
    foreach (ex[i]) s.push_back(ex[i]);
    run_bwt(s, "example");
    for (int t = 0; t < 6; t++) begin
      int m = (t % 3 == 0) ? 16 : (t % 3 == 1) ? 33 : 64;
      s = {};
      for (int i = 0; i < m; i++) s.push_back($urandom_range(97, 97 + (t % 2) * 10 + 1));
      run_bwt(s, $sformatf("bwt%0d", t));
    end
    chk(seen_sl > 0 && seen_gr > 0 && seen_sr > 0 && seen_cs > 0, "all BWT states visited");
    // LZ77: one cycle per symbol
    s = {};
    for (int i = 0; i < 64; i++) s.push_back((i % 7 < 4) ? "a" : "b");
    load(s);
    cmd_len = 7'd64; lz_new = 1; lz_last = 1; cmd_lz = 1;
    @(posedge clk); #1 cmd_lz = 0;
    chk(state == ST_LZ77, "Reset must lead to LZ77");
    cyc = 1;
    while (!op_done) begin @(posedge clk); #1 cyc++; end
    chk(cyc == 1 + 64, $sformatf("LZ77: %0d cycles for 64 symbols", cyc));
    chk(tok_count == 7'd4, $sformatf("LZ77 token count %0d expected 4", tok_count));
    // reset command aborts a BWT run
    cmd_len = 7'd64; cmd_bwt = 1; @(posedge clk); #1 cmd_bwt = 0;
    repeat (50) @(posedge clk);
    #1 cmd_reset = 1; @(posedge clk); #1 cmd_reset = 0;
    chk(state == ST_RESET && !busy, "reset command returns to Reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
