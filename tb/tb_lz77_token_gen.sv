// tb_lz77_token_gen: the token generator fed by a dictionary model kept here
// (64 cells, newest symbol on the right, valid flags), one symbol per cycle.
// The tokens are compared with a greedy LZ77 reference (longest match among
// the last 64 symbols, nearest on ties, at most 255 symbols, the final symbol
// always closing the last token), including the example of the classic LZ77
// illustration: (0,0,_) (0,0,s) (0,0,h) (0,0,e) (4,2,e) (0,0,l) (1,1,s)
// (6,3,a) (14,4,l). A token must appear in the same cycle as the symbol that
// ends the match. clear must restart matching with an empty history.
module tb_lz77_token_gen;
  import bwtlz_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n, clear, step, force_emit, matched, tok_valid;
  sym_t sym; logic [N-1:0] found; token_t token;
  int checks = 0, failures = 0;
  typedef struct { int off; int len; int nxt; } tok_s;

  lz77_token_gen #(.N(N), .LEN_W(8)) dut (.clk, .rst_n, .clear, .step, .force_emit, .sym, .found,
    .matched, .tok_valid, .token);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

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

  task automatic run(input byte unsigned s[$], input string name, output tok_s got[$]);
    byte unsigned dict[$];
    tok_s exp[$];
    ref_lz(s, exp);
    clear = 1; @(posedge clk); #1 clear = 0;
    dict = {};
    got = {};
    for (int i = 0; i < s.size(); i++) begin
      sym = s[i];
      force_emit = (i == s.size() - 1);
      found = '0;
      for (int j = 0; j < dict.size(); j++) if (dict[dict.size()-1-j] == sym) found[N-1-j] = 1'b1;
      step = 1;
      #1;
      if (tok_valid) got.push_back('{off: token.offset, len: token.length, nxt: token.next});
      @(posedge clk); #1 step = 0;
      dict.push_back(s[i]);
      if (dict.size() > N) void'(dict.pop_front());
    end
    chk(got.size() == exp.size(), $sformatf("%s: %0d tokens, expected %0d", name, got.size(), exp.size()));
    for (int t = 0; t < got.size() && t < exp.size(); t++)
      chk(got[t] == exp[t], $sformatf("%s token %0d: (%0d,%0d,%h) expected (%0d,%0d,%h)", name, t,
          got[t].off, got[t].len, got[t].nxt, exp[t].off, exp[t].len, exp[t].nxt));
  endtask

  initial begin
    byte unsigned s[$];
    tok_s got[$], fig[$];
    string ex = "_she_sells_sea_shells";
    rst_n = 0; clear = 0; step = 0; force_emit = 0; sym = 0; found = '0;
    @(posedge clk); #1 rst_n = 1;
    foreach (ex[i]) s.push_back(ex[i]);
    run(s, "example", got);
    fig = '{'{0,0,"_"}, '{0,0,"s"}, '{0,0,"h"}, '{0,0,"e"}, '{4,2,"e"},
            '{0,0,"l"}, '{1,1,"s"}, '{6,3,"a"}, '{14,4,"l"}};
    for (int t = 0; t < fig.size(); t++)
      chk(t < got.size() && got[t] == fig[t], $sformatf("example token %0d", t));
    for (int r = 0; r < 8; r++) begin
      s = {};
      for (int i = 0; i < 150 + $urandom_range(150); i++) s.push_back($urandom_range(97, 97 + (r % 4) * 3 + 1));
      run(s, $sformatf("random%0d", r), got);
    end
    s = {};
    for (int i = 0; i < 600; i++) s.push_back("x");
    run(s, "long run", got);
    chk(got.size() > 2 && got[1].len == 255, "length limit of 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
