// tb_bwtlz_coproc: end-to-end test of the BWT/LZ77 coprocessor at its default
// size (64 cells), driven through the FPU-port instruction set the way the
// host program does it: ResetCoprocessor, ReadData, ExecuteBWT/ExecuteLZ77,
// WriteData.
//
// BWT: the running example "_she_sells_sea_shells" (last column
// "sesaehsshsseellll____", index 2), 128-bit (16-symbol) blocks and full
// 64-symbol blocks of random text over small and large alphabets, plus
// periodic blocks whose rotations never separate. Each result is compared with
// a reference computed here by sorting the rotations directly; the number of
// sorting phases and the cycle count (2*m*phases + m, or one per symbol for LZ77, plus a fixed 4-cycle
// instruction overhead) are checked too.
// LZ77: the example "_she_sells_sea_shells" (tokens of the classic LZ77
// illustration) and random streams split into blocks of up to 64 symbols,
// compared token by token with a greedy reference encoder (longest match in
// the last 64 symbols, nearest on ties, 255-symbol limit). The test counts how
// often each mechanism occurred and fails if one never did.
module tb_bwtlz_coproc;
  import bwtlz_pkg::*;

  localparam int N = 64;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        fp_start;
  logic [8:0]  fp_opf;
  logic [63:0] fp_op1, fp_op2;
  logic        fp_busy, fp_rdy;
  logic [63:0] fp_res;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_bwt_done = 0, n_bwt_limit = 0, n_get_right = 0, n_get_left = 0;
  int n_multi_phase = 0, n_blocked_swap = 0, n_swap = 0;
  int n_literal = 0, n_match = 0, n_cross_block = 0, n_force_last = 0, n_force_max = 0;
  int n_dict_clear = 0, n_small_block = 0;

  bwtlz_coproc dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe internal events of the Weavesorter for the mechanism counts
  logic [N/2-1:0] obs_swap, obs_blocked;
  for (genvar k = 0; k < N/2; k++) begin : g_obs
    assign obs_swap[k]    = dut.u_ws.g_cmp[k].swap;
    assign obs_blocked[k] = dut.u_ws.ctrl[2*k+1] &&
                            (dut.u_ws.sym[2*k] > dut.u_ws.sym[2*k+1]);
  end
  always @(posedge clk) begin
    if (rst_n && dut.ws_op == WS_CMP) begin
      n_swap         += $countones(obs_swap);
      n_blocked_swap += $countones(obs_blocked);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic issue(input logic [8:0] opf, input logic [63:0] op1, input logic [63:0] op2,
                       output logic [63:0] res, output int cycles);
    while (fp_busy) @(posedge clk);
    fp_opf   <= opf;
    fp_op1   <= op1;
    fp_op2   <= op2;
    fp_start <= 1'b1;
    @(posedge clk);
    fp_start <= 1'b0;
    cycles = 1;
    while (!fp_rdy) begin
      @(posedge clk);
      cycles++;
    end
    #1;
    res = fp_res;
    @(posedge clk);
  endtask

  task automatic load(input byte unsigned d[$]);
    logic [63:0] r;
    int c;
    logic [127:0] w;
    for (int g = 0; g * 16 < d.size(); g++) begin
      w = '0;
      for (int j = 0; j < 16; j++)
        if (g * 16 + j < d.size()) w[(15-j)*8 +: 8] = d[g*16+j];
      issue(OPF_FADDD, w[127:64], w[63:0], r, c);
    end
  endtask

  // ---------------- BWT reference ----------------
  function automatic int rot_cmp(input byte unsigned s[$], input int a, input int b, output int lcp);
    int m = s.size();
    lcp = 0;
    for (int t = 0; t < m; t++) begin
      byte unsigned x = s[(a+t)%m], y = s[(b+t)%m];
      if (x != y) return (x < y) ? -1 : 1;
      lcp++;
    end
    return 0;
  endfunction

  task automatic ref_bwt(input byte unsigned s[$], output byte unsigned L[$], output int I,
                         output int P, output bit distinct);
    int m = s.size();
    int order[$];
    int D, lcp, tmp;
    for (int a = 0; a < m; a++) order.push_back(a);
    for (int i = 1; i < m; i++)
      for (int j = i; j > 0; j--) begin
        if (rot_cmp(s, order[j-1], order[j], lcp) > 0) begin
          tmp = order[j]; order[j] = order[j-1]; order[j-1] = tmp;
        end else break;
      end
    L = {};
    D = 1;
    distinct = 1;
    for (int r = 0; r < m; r++) begin
      L.push_back(s[(order[r] + m - 1) % m]);
      if (order[r] == 0) I = r;
      if (r > 0) begin
        void'(rot_cmp(s, order[r-1], order[r], lcp));
        if (lcp + 1 > D) D = lcp + 1;
        if (lcp == m) distinct = 0;
      end
    end
    P = D + 1;
    if (P < 2) P = 2;
    if (P > m + 1) P = m + 1;
  endtask

  task automatic run_bwt(input byte unsigned s[$], input string name);
    byte unsigned L[$];
    int I, P, m, cyc, c;
    bit distinct;
    logic [63:0] r;
    m = s.size();
    ref_bwt(s, L, I, P, distinct);
    issue(OPF_FMULD, 0, 0, r, c);
    load(s);
    issue(OPF_FSQRTD, 0, 64'(m), r, cyc);
    check(cyc == 2*m*P + m + 4, $sformatf("%s: BWT cycles %0d, expected %0d", name, cyc, 2*m*P + m + 4));
    for (int g = 0; g * 8 < m; g++) begin
      issue(OPF_FSUBD, 64'(g), 0, r, c);
      for (int j = 0; j < 8 && g*8 + j < m; j++)
        check(r[(7-j)*8 +: 8] == L[g*8+j],
              $sformatf("%s: L[%0d] = %02x, expected %02x", name, g*8+j, r[(7-j)*8 +: 8], L[g*8+j]));
    end
    issue(OPF_FSUBD, 64'h8000_0000_0000_0000, 0, r, c);
    check(r[31:16] == 16'(m), $sformatf("%s: block length %0d", name, r[31:16]));
    check(r[15:0] == 16'(P), $sformatf("%s: phases %0d, expected %0d", name, r[15:0], P));
    if (distinct) check(r[47:32] == 16'(I), $sformatf("%s: index %0d, expected %0d", name, r[47:32], I));
    if (distinct) n_bwt_done++; else n_bwt_limit++;
    if (P % 2 == 0) n_get_right++; else n_get_left++;
    if (P > 2) n_multi_phase++;
    if (m < N) n_small_block++;
  endtask

  // ---------------- LZ77 reference ----------------
  typedef struct { int off; int len; int nxt; } tok_s;

  task automatic ref_lz(input byte unsigned s[$], output tok_s toks[$]);
    int i = 0, n = s.size();
    toks = {};
    while (i < n) begin
      int best_l = 0, best_d = 0;
      int avail = (i < N) ? i : N;
      for (int d = 1; d <= avail; d++) begin
        int l = 0;
        while (i + l < n - 1 && l < 255 && s[i-d+l] == s[i+l]) l++;
        if (l > best_l) begin best_l = l; best_d = d; end
      end
      toks.push_back('{off: (best_l > 0) ? best_d : 0, len: best_l, nxt: s[i+best_l]});
      i += best_l + 1;
    end
  endtask

  task automatic run_lz(input byte unsigned s[$], input int blk, input string name);
    tok_s exp[$], got[$];
    byte unsigned b[$];
    logic [63:0] r;
    int c, cyc, ntok, pos, cnt;
    ref_lz(s, exp);
    got = {};
    pos = 0;
    while (pos < s.size()) begin
      cnt = (s.size() - pos < blk) ? s.size() - pos : blk;
      b = s[pos : pos + cnt - 1];
      issue(OPF_FMULD, 0, 0, r, c);
      load(b);
      issue(OPF_FSQRTS, 0, {54'd0, (pos + cnt == s.size()), (pos == 0), 8'(cnt)}, r, cyc);
      check(cyc == cnt + 4, $sformatf("%s: LZ77 cycles %0d for %0d symbols", name, cyc, cnt));
      if (pos == 0) n_dict_clear++;
      issue(OPF_FSUBD, 64'h8000_0000_0000_0000, 0, r, c);
      ntok = r[63:48];
      if (ntok == 0) n_cross_block++;
      for (int g = 0; g * 2 < ntok; g++) begin
        issue(OPF_FSUBD, 64'(g), 0, r, c);
        for (int h = 0; h < 2 && g*2 + h < ntok; h++) begin
          logic [31:0] w = h ? r[31:0] : r[63:32];
          got.push_back('{off: w[23:16], len: w[15:8], nxt: w[7:0]});
        end
      end
      pos += cnt;
    end
    check(got.size() == exp.size(), $sformatf("%s: %0d tokens, expected %0d", name, got.size(), exp.size()));
    for (int t = 0; t < exp.size() && t < got.size(); t++) begin
      check(got[t] == exp[t], $sformatf("%s: token %0d (%0d,%0d,%02x), expected (%0d,%0d,%02x)", name, t,
            got[t].off, got[t].len, got[t].nxt, exp[t].off, exp[t].len, exp[t].nxt));
      if (exp[t].len == 0) n_literal++; else n_match++;
      if (exp[t].len == 255) n_force_max++;
    end
    if (exp.size() > 0 && exp[$].len > 0) begin
      // a match that ran into the end of the stream was closed by the last symbol
      int tot = 0;
      foreach (exp[t]) tot += exp[t].len + 1;
      if (tot == s.size()) n_force_last++;
    end
  endtask

  function automatic byte unsigned rnd_sym(input int alph);
    return byte'(97 + $urandom_range(alph - 1));
  endfunction

  initial begin : main
    byte unsigned s[$];
    string ex = "_she_sells_sea_shells";
    tok_s fig_exp[$];
    tok_s got_ex[$];

    void'($urandom(7));
    fp_start = 1'b0;
    fp_opf   = '0;
    fp_op1   = '0;
    fp_op2   = '0;
    rst_n    = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- BWT: running example ----
    s = {};
    foreach (ex[i]) s.push_back(ex[i]);
    begin
      byte unsigned L[$]; int I, P; bit dd;
      string exp_l = "sesaehsshsseellll____";
      ref_bwt(s, L, I, P, dd);
      check(I == 2, "reference index of the example");
      foreach (exp_l[i]) check(L[i] == exp_l[i], "reference last column of the example");
    end
    run_bwt(s, "example");

    // ---- BWT: 16-symbol (128-bit) and 64-symbol blocks ----
    for (int t = 0; t < 12; t++) begin
      int m = (t % 3 == 0) ? 16 : 64;
      int alph = (t % 4 == 0) ? 2 : (t % 4 == 1) ? 4 : (t % 4 == 2) ? 26 : 8;
      s = {};
      for (int i = 0; i < m; i++) s.push_back(rnd_sym(alph));
      run_bwt(s, $sformatf("bwt%0d", t));
    end
    // periodic blocks: identical rotations, the run stops at the phase limit
    s = {};
    for (int i = 0; i < 16; i++) s.push_back((i % 4 < 2) ? "a" : "b");
    run_bwt(s, "periodic16");
    s = {};
    for (int i = 0; i < 32; i++) s.push_back("z");
    run_bwt(s, "constant32");

    // ---- LZ77: the classic example ----
    s = {};
    foreach (ex[i]) s.push_back(ex[i]);
    fig_exp = '{'{0,0,"_"}, '{0,0,"s"}, '{0,0,"h"}, '{0,0,"e"}, '{4,2,"e"},
                '{0,0,"l"}, '{1,1,"s"}, '{6,3,"a"}, '{14,4,"l"}};
    ref_lz(s, got_ex);
    for (int t = 0; t < fig_exp.size(); t++)
      check(got_ex[t] == fig_exp[t], $sformatf("reference LZ77 token %0d of the example", t));
    run_lz(s, 64, "lz-example");

    // ---- LZ77: random streams over several blocks ----
    for (int t = 0; t < 6; t++) begin
      int len = 100 + $urandom_range(200);
      int alph = (t % 3 == 0) ? 2 : (t % 3 == 1) ? 4 : 20;
      s = {};
      for (int i = 0; i < len; i++) s.push_back(rnd_sym(alph));
      run_lz(s, (t % 2) ? 16 : 64, $sformatf("lz%0d", t));
    end
    // long run: length limit and matches spanning blocks
    s = {};
    for (int i = 0; i < 300; i++) s.push_back("q");
    s.push_back("r");
    run_lz(s, 64, "lz-run");

    // ---- mechanisms ----
    check(n_bwt_done > 0,     "BWT finished by Done never seen");
    check(n_bwt_limit > 0,    "BWT stopped by the phase limit never seen");
    check(n_get_right > 0,    "GetResults shifting right never seen");
    check(n_get_left > 0,     "GetResults shifting left never seen");
    check(n_multi_phase > 0,  "BWT needing more than two phases never seen");
    check(n_swap > 0,         "compare/swap never swapped");
    check(n_blocked_swap > 0, "control bit never blocked a swap");
    check(n_small_block > 0,  "block shorter than the Weavesorter never seen");
    check(n_literal > 0,      "LZ77 literal token never seen");
    check(n_match > 0,        "LZ77 match token never seen");
    check(n_cross_block > 0,  "LZ77 match spanning a whole block never seen");
    check(n_force_last > 0,   "LZ77 match closed by the end of the stream never seen");
    check(n_force_max > 0,    "LZ77 length limit never reached");
    check(n_dict_clear > 0,   "LZ77 dictionary clear never seen");
    $display("mechanisms: done=%0d limit=%0d get_r=%0d get_l=%0d multi=%0d swap=%0d blocked=%0d small=%0d lit=%0d match=%0d cross=%0d last=%0d max=%0d clear=%0d",
             n_bwt_done, n_bwt_limit, n_get_right, n_get_left, n_multi_phase, n_swap, n_blocked_swap,
             n_small_block, n_literal, n_match, n_cross_block, n_force_last, n_force_max, n_dict_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
