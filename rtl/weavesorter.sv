// weavesorter: the complete Weavesorter machine of N cells, modified for LZ77.
//
// A bidirectional shift register of N cells (symbol + block address) with one
// compare/swap unit for each pair of cells (2k, 2k+1), N/2 in all, and the
// ControlShiftRegister whose bits block those units. Each cycle the machine
// does one operation, chosen by op (the "Config" input): hold, shift right
// (Input enters cell 0, cell N-1 leaves), shift left (Input enters cell N-1,
// cell 0 leaves) or compare/swap. Shifting a string in from one side and out
// of the other, with a compare/swap after every shift, hands out the symbols
// in sorted order: ascending from the left end, descending from the right end.
// The Output multiplexer presents the cell that would leave on the next shift
// in direction dir_right, with its control bit as ctrl_out. All outputs are
// combinational from the registers; a shift takes effect at the clock edge.
//
// For LZ77 every cell also compares its symbol with Search; found[i] is
// qualified by control bit i, which the control unit uses as "cell holds a
// dictionary symbol" in that mode.
// Structure (cells, pairwise comparators, ControlShiftRegister, AND gate,
// output multiplexer, Found outputs) follows the design; the pair alignment of
// the comparators is taken from its drawings of the machine.
module weavesorter
  import bwtlz_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ws_op_e        op,
  input  logic          dir_right,        // side the Output multiplexer shows
  input  sym_t          in_sym,
  input  logic [AW-1:0] in_addr,
  input  logic          ctrl_in,
  input  logic          ctrl_load,
  input  logic          ctrl_load_val,
  input  sym_t          search,
  output sym_t          out_sym,
  output logic [AW-1:0] out_addr,
  output logic          ctrl_out,
  output logic          done,
  output logic [N-1:0]  found
);

  sym_t          sym  [N];
  logic [AW-1:0] addr [N];
  logic [N-1:0]  ctrl;
  logic [N-1:0]  swap_of_cell;
  sym_t          swap_sym  [N];
  logic [AW-1:0] swap_addr [N];

  ws_ctrl_shift_reg #(.N(N)) u_ctrl (
    .clk, .rst_n, .op, .ctrl_in,
    .load(ctrl_load), .load_val(ctrl_load_val),
    .ctrl, .done
  );

  for (genvar k = 0; k < N/2; k++) begin : g_cmp
    logic swap;
    ws_comparator u_cmp (
      .left_sym(sym[2*k]), .right_sym(sym[2*k+1]),
      .block(ctrl[2*k+1]), .swap
    );
    assign swap_of_cell[2*k]   = swap;
    assign swap_of_cell[2*k+1] = swap;
    assign swap_sym[2*k]       = sym[2*k+1];
    assign swap_addr[2*k]      = addr[2*k+1];
    assign swap_sym[2*k+1]     = sym[2*k];
    assign swap_addr[2*k+1]    = addr[2*k];
  end

  for (genvar i = 0; i < N; i++) begin : g_cell
    ws_cell #(.AW(AW)) u_cell (
      .clk, .rst_n, .op,
      .left_sym  ((i == 0)   ? in_sym  : sym[(i == 0) ? 0 : i-1]),
      .left_addr ((i == 0)   ? in_addr : addr[(i == 0) ? 0 : i-1]),
      .right_sym ((i == N-1) ? in_sym  : sym[(i == N-1) ? N-1 : i+1]),
      .right_addr((i == N-1) ? in_addr : addr[(i == N-1) ? N-1 : i+1]),
      .swap(swap_of_cell[i]), .swap_sym(swap_sym[i]), .swap_addr(swap_addr[i]),
      .search, .valid(ctrl[i]),
      .sym(sym[i]), .addr(addr[i]), .found(found[i])
    );
  end

  assign out_sym  = dir_right ? sym[N-1]  : sym[0];
  assign out_addr = dir_right ? addr[N-1] : addr[0];
  assign ctrl_out = dir_right ? ctrl[N-1] : ctrl[0];

  initial assert (N >= 4 && N % 2 == 0) else $error("weavesorter: N must be even and >= 4");

endmodule
