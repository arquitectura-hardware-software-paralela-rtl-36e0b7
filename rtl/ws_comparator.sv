// ws_comparator: compare/swap unit "C" of the Weavesorter machine.
//
// One comparator serves a fixed pair of neighbouring cells (cells 2k and
// 2k+1). It requests a swap when the left symbol is larger than the right one,
// which keeps each pair in ascending order. A set control bit blocks the swap,
// so symbols of different groups (or different columns) never mix. Purely
// combinational; the cells act on swap in a WS_CMP cycle.
module ws_comparator
  import bwtlz_pkg::*;
(
  input  sym_t left_sym,
  input  sym_t right_sym,
  input  logic block,       // control bit: a group boundary lies between the two cells
  output logic swap
);
  assign swap = !block && (left_sym > right_sym);
endmodule
