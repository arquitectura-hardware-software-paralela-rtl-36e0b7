// lz77_token_gen: LZ77 token generator attached to the Weavesorter cells.
//
// Every cycle with step high, the current symbol is compared (by the cells)
// with the whole dictionary, giving found[]. A History bit per cell records
// where the string matched so far can continue: AND-group (a) forms
// match = found & history, an OR tree turns it into Matched, and while
// Matched holds the new match vector is written back to History (AND-group
// (b)) and the length counter counts up. Because the dictionary shifts left by
// one cell per symbol, a continuing match shows up at the same cell index.
// When no position continues, the positions still in History are the last
// ones deleted; the priority encoder picks the right-most of them and the
// token (T_o = N - index, T_l = counter, T_n = current symbol) is emitted in
// that same cycle. Then History is set to all ones (through the inverted
// Matched) and the counter cleared, so the next symbol starts a new string.
// With force high (end of input) or with the counter at its maximum, the
// current symbol is emitted as T_n even if it matched.
// T_o counts back from the newest dictionary symbol (1 = newest), and 0 with
// T_l = 0 means a literal, as in the (0,0,symbol) tokens of LZ77. The
// structure follows the design; the counter width, the forced emission and the
// offset convention are this implementation's choices.
module lz77_token_gen
  import bwtlz_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter int unsigned LEN_W = 8,
  parameter int unsigned AW    = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,      // start a new stream
  input  logic         step,       // a symbol is presented this cycle
  input  logic         force_emit, // emit a token with this symbol whatever matches
  input  sym_t         sym,        // current symbol (T_n candidate)
  input  logic [N-1:0] found,      // from the dictionary cells
  output logic         matched,
  output logic         tok_valid,
  output token_t       token
);

  logic [N-1:0]     history;
  logic [N-1:0]     match;
  logic [LEN_W-1:0] length;
  logic [AW-1:0]    pe_idx;
  logic             pe_valid;
  logic             len_max;
  logic             cont;

  assign match = found & history;            // AND-group (a)

  or_tree #(.N(N)) u_or (.x(match), .y(matched));

  priority_encoder #(.N(N)) u_pe (.x(history), .idx(pe_idx), .valid(pe_valid));

  assign len_max = (length == {LEN_W{1'b1}});
  assign cont    = matched && !force_emit && !len_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      history <= '1;
      length  <= '0;
    end else if (clear) begin
      history <= '1;
      length  <= '0;
    end else if (step) begin
      if (cont) begin
        history <= match;                    // AND-group (b)
        length  <= length + 1'b1;
      end else begin
        history <= '1;                       // set by NOT Matched
        length  <= '0;
      end
    end
  end

  always_comb begin
    tok_valid    = step && !clear && !cont;
    token.next   = sym;
    token.length = 8'(length);
    token.offset = (length != 0 && pe_valid) ? 8'(N - pe_idx) : 8'd0;
  end

  initial assert (N <= 255 && LEN_W <= 8) else $error("lz77_token_gen: token fields are 8 bits");

endmodule
