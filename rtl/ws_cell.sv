// ws_cell: one register cell of the Weavesorter machine.
//
// A cell stores a symbol together with the block address it came from; the
// address travels with the symbol and takes no part in the comparison. Each
// clock the cell either holds, loads from its left neighbour (shift right),
// loads from its right neighbour (shift left) or loads the value its
// compare/swap unit hands it. The cell also carries the comparator added for
// LZ77: Found is high when the stored symbol equals the Search symbol and the
// cell is marked valid. Found is combinational (same cycle as Search).
// The cell structure and the Found comparator follow the design; the explicit
// "valid" qualifier on Found is this implementation's way of ignoring cells
// that do not yet hold dictionary symbols.
module ws_cell
  import bwtlz_pkg::*;
#(
  parameter int unsigned AW = 6            // address width, $clog2(number of cells)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ws_op_e        op,
  input  sym_t          left_sym,          // neighbour (or Input) on the left
  input  logic [AW-1:0] left_addr,
  input  sym_t          right_sym,         // neighbour (or Input) on the right
  input  logic [AW-1:0] right_addr,
  input  logic          swap,              // take swap_sym/swap_addr in a WS_CMP cycle
  input  sym_t          swap_sym,
  input  logic [AW-1:0] swap_addr,
  input  sym_t          search,            // LZ77 Search symbol
  input  logic          valid,             // cell holds a dictionary symbol
  output sym_t          sym,
  output logic [AW-1:0] addr,
  output logic          found
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym  <= '0;
      addr <= '0;
    end else begin
      unique case (op)
        WS_SHIFT_R: begin sym <= left_sym;  addr <= left_addr;  end
        WS_SHIFT_L: begin sym <= right_sym; addr <= right_addr; end
        WS_CMP:     if (swap) begin sym <= swap_sym; addr <= swap_addr; end
        default:    ;
      endcase
    end
  end

  assign found = valid && (sym == search);

endmodule
