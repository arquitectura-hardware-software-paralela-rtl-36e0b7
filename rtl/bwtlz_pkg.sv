// bwtlz_pkg: types and constants shared by the BWT/LZ77 coprocessor.
//
// Holds the symbol type (8-bit symbols, as the 8-bit cell registers of the
// coprocessor), the operation codes of the Weavesorter machine, the states of
// the control unit (Reset, ShiftRight, Compare/Swap, ShiftLeft, GetResults and
// LZ77, as in the control FSM of the design), the SPARC V8 FPop "opf" codes
// that the coprocessor reuses as its instruction set, and the LZ77 token.
// The opf values are those of the SPARC V8 architecture; the token layout and
// the Weavesorter operation encoding are choices of this implementation.
package bwtlz_pkg;

  localparam int unsigned SYM_W = 8;
  typedef logic [SYM_W-1:0] sym_t;

  // Operation applied to the Weavesorter in one clock cycle.
  typedef enum logic [1:0] {
    WS_HOLD    = 2'd0,
    WS_SHIFT_R = 2'd1,   // shift right, new entry at cell 0
    WS_SHIFT_L = 2'd2,   // shift left, new entry at cell N-1
    WS_CMP     = 2'd3    // compare/swap every unblocked pair
  } ws_op_e;

  // Control unit states.
  typedef enum logic [2:0] {
    ST_RESET        = 3'd0,
    ST_SHIFT_RIGHT  = 3'd1,
    ST_COMPARE_SWAP = 3'd2,
    ST_SHIFT_LEFT   = 3'd3,
    ST_GET_RESULTS  = 3'd4,
    ST_LZ77         = 3'd5
  } ctl_state_e;

  // SPARC V8 FPop opf field values of the five instructions the coprocessor decodes.
  localparam logic [8:0] OPF_FADDD  = 9'h042;  // ReadData
  localparam logic [8:0] OPF_FSUBD  = 9'h046;  // WriteData
  localparam logic [8:0] OPF_FMULD  = 9'h04A;  // ResetCoprocessor
  localparam logic [8:0] OPF_FSQRTS = 9'h029;  // ExecuteLZ77
  localparam logic [8:0] OPF_FSQRTD = 9'h02A;  // ExecuteBWT

  // LZ77 token (T_o, T_l, T_n); packed into the low 24 bits of a 32-bit word.
  typedef struct packed {
    logic [7:0] offset;   // T_o: distance back from the newest dictionary symbol, 0 = no match
    logic [7:0] length;   // T_l: matched length
    sym_t       next;     // T_n: symbol following the match
  } token_t;

endpackage
