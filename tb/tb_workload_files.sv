// tb_workload_files: the host programs of the coprocessor run over whole
// files, as in the comparison with software sorting: every file is cut into
// 128-bit blocks (16 symbols of 8 bits, the last block shorter), and each block
// is transformed with ResetCoprocessor, ReadData, ExecuteBWT and WriteData.
// The same file is then LZ77-encoded as one stream in 64-symbol blocks.
//
// The files are generated here with a fixed seed, standing in for the kinds of
// file of a text-compression corpus: English prose built from a word list,
// program source, and a bitmap-like file that is mostly zero bytes with short
// runs of ink. Every block's last column, index, phase count and cycle count
// and every LZ77 token are compared with references computed in the testbench.
// Per file the testbench prints the blocks, the mean sorting phases, the
// ExecuteBWT cycles (2*m*phases + m + 4 each) and the LZ77 cycles. The
// bitmap-like file shows the slow case of the Weavesorter: its blocks of equal
// symbols never separate and run to the phase limit.
module tb_workload_files;
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
  longint bwt_cycles, lz_cycles, host_cycles;
  int bwt_phases, n_limit, n_literal, n_match, n_instr;

  bwtlz_coproc dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
    n_instr++;
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
    host_cycles += cycles;
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
    bwt_cycles += cyc;
    bwt_phases += P;
    if (!distinct) n_limit++;
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
      lz_cycles += cyc;
      issue(OPF_FSUBD, 64'h8000_0000_0000_0000, 0, r, c);
      ntok = r[63:48];
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
    end
  endtask

  // ---------------- generated files ----------------
  function automatic void gen_prose(inout byte unsigned f[$], input int size);
    string words[] = '{"the", "of", "and", "a", "to", "in", "was", "she", "it", "said",
                       "alice", "queen", "little", "very", "what", "down", "rabbit",
                       "would", "could", "herself", "thought", "time", "off", "again"};
    while (f.size() < size) begin
      string w = words[$urandom_range(words.size() - 1)];
      foreach (w[i]) if (f.size() < size) f.push_back(w[i]);
      if (f.size() < size) f.push_back(($urandom_range(9) == 0) ? "," : " ");
    end
  endfunction

  function automatic void gen_source(inout byte unsigned f[$], input int size);
    string lines[] = '{"  if (n > 0) {\n", "    n = n - 1;\n", "  }\n", "  x[i] = y[i] + z;\n",
                       "  for (i = 0; i < n; i++)\n", "  return x;\n", "int f(int n)\n{\n"};
    while (f.size() < size) begin
      string l = lines[$urandom_range(lines.size() - 1)];
      foreach (l[i]) if (f.size() < size) f.push_back(l[i]);
    end
  endfunction

  function automatic void gen_bitmap(inout byte unsigned f[$], input int size);
    while (f.size() < size) begin
      if ($urandom_range(5) == 0) begin
        int r = 1 + $urandom_range(6);
        for (int i = 0; i < r && f.size() < size; i++) f.push_back(8'hff);
        if (f.size() < size) f.push_back(byte'($urandom_range(1, 254)));
      end else begin
        int r = 8 + $urandom_range(24);
        for (int i = 0; i < r && f.size() < size; i++) f.push_back(8'h00);
      end
    end
  endfunction

  task automatic run_file(input byte unsigned f[$], input string name);
    byte unsigned b[$];
    int nblk = 0;
    longint h0;
    bwt_cycles = 0; bwt_phases = 0; n_limit = 0; lz_cycles = 0;
    h0 = host_cycles;
    for (int pos = 0; pos < f.size(); pos += 16) begin
      int m = (f.size() - pos < 16) ? f.size() - pos : 16;
      b = f[pos : pos + m - 1];
      run_bwt(b, $sformatf("%s block %0d", name, nblk));
      nblk++;
    end
    $display("%s: %0d bytes, %0d BWT blocks, mean phases %0.2f, %0d at the phase limit, ExecuteBWT cycles %0d, host loop cycles %0d",
             name, f.size(), nblk, real'(bwt_phases) / nblk, n_limit, bwt_cycles, host_cycles - h0);
    run_lz(f, 64, {name, " lz77"});
    check(lz_cycles == longint'(f.size()) + 4 * ((f.size() + 63) / 64),
          $sformatf("%s: LZ77 cycles %0d", name, lz_cycles));
    $display("%s: LZ77 execute cycles %0d for %0d symbols", name, lz_cycles, f.size());
  endtask

  initial begin : main
    byte unsigned f[$];
    void'($urandom(11));
    host_cycles = 0;
    n_literal = 0; n_match = 0; n_instr = 0;
    fp_start = 1'b0;
    fp_opf   = '0;
    fp_op1   = '0;
    fp_op2   = '0;
    rst_n    = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    f = {}; gen_prose(f, 512);  run_file(f, "prose");
    f = {}; gen_source(f, 407); run_file(f, "source");
    f = {}; gen_bitmap(f, 480); run_file(f, "bitmap");
    check(n_limit > 0, "no block ran to the phase limit");
    check(n_literal > 0 && n_match > 0, "LZ77 produced no literals or no matches");
    $display("%0d instructions issued", n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
