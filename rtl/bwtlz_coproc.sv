// bwtlz_coproc: BWT/LZ77 compression coprocessor (top level).
//
// One shared datapath runs two lossless compression front ends: the sorting
// step of the Burrows-Wheeler Transform and the dictionary search of LZ77.
// Its core is the Weavesorter machine, a bidirectional shift register of N
// symbol cells with pairwise compare/swap units. For BWT it sorts the cyclic
// rotations of a block of m <= N symbols column by column and returns the
// last column and the index of the original string. For LZ77 the same cells
// form the sliding dictionary: the input is shifted in from the right, every
// cell compares its symbol with the incoming one, and the token generator
// turns the match flags into (offset, length, next symbol) tokens at one
// symbol per clock.
//
// The coprocessor sits on the processor's FPU port and is driven by five
// floating-point instructions (see fpu_if): ReadData (FADDd) loads 16 symbols,
// ExecuteBWT (FSQRTd) and ExecuteLZ77 (FSQRTs) start a run and complete when
// it ends, WriteData (FSUBd) returns 8 result symbols or 2 tokens, and
// ResetCoprocessor (FMULd) returns the control unit to its Reset state.
// BWT takes 1 + 2m*phases + m cycles after the command reaches the control
// unit, where phases is one more than the number of leading symbols needed to
// tell all rotations apart (at least 2); LZ77 takes one cycle per symbol.
// Block diagram, instruction set and the 64-cell size follow the design; the
// port-level handshake is this implementation's choice.
module bwtlz_coproc
  import bwtlz_pkg::*;
#(
  parameter int unsigned N_CELLS = 64,
  parameter int unsigned LEN_W   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fp_start,
  input  logic [8:0]  fp_opf,
  input  logic [63:0] fp_op1,
  input  logic [63:0] fp_op2,
  output logic        fp_busy,
  output logic        fp_rdy,
  output logic [63:0] fp_res
);
  localparam int unsigned N       = N_CELLS;
  localparam int unsigned AW      = $clog2(N);
  localparam int unsigned CW      = AW + 1;
  localparam int unsigned RD_SYMS = 16;
  localparam int unsigned WR_SYMS = 8;

  // interface <-> block register / control / result buffer
  logic                     mem_we;
  logic [AW-1:0]            mem_wbase;
  logic [RD_SYMS*SYM_W-1:0] mem_wdata;
  logic [AW-1:0]            rd_addr;
  sym_t                     rd_sym;
  logic                     cmd_bwt, cmd_lz, cmd_reset, lz_new, lz_last;
  logic [CW-1:0]            cmd_len;
  logic                     ctl_busy, ctl_done;
  ctl_state_e               ctl_state;
  logic [AW-1:0]            res_grp;
  logic [63:0]              res_syms, res_tokens;
  logic [AW-1:0]            bwt_index;
  logic [CW-1:0]            tok_count, block_len, phases;
  logic                     res_we;
  logic [AW-1:0]            res_addr;
  logic [31:0]              res_data;
  // Weavesorter
  ws_op_e                   ws_op;
  logic                     ws_dir_right, ws_ctrl_in, ws_ctrl_load, ws_ctrl_load_val;
  sym_t                     ws_in_sym, ws_out_sym;
  logic [AW-1:0]            ws_in_addr, ws_out_addr;
  logic                     ws_ctrl_out, ws_done;
  logic [N-1:0]             found;
  // token generator
  logic                     tg_clear, tg_step, tg_force, tg_tok_valid, tg_matched;
  token_t                   tg_token;

  fpu_if #(.N(N), .RD_SYMS(RD_SYMS)) u_if (
    .clk, .rst_n,
    .fp_start, .fp_opf, .fp_op1, .fp_op2, .fp_busy, .fp_rdy, .fp_res,
    .mem_we, .mem_wbase, .mem_wdata,
    .cmd_bwt, .cmd_lz, .cmd_reset, .cmd_len, .lz_new, .lz_last,
    .ctl_done,
    .res_grp, .res_syms, .res_tokens,
    .bwt_index, .tok_count, .block_len, .phases
  );

  block_mem #(.N(N), .RD_SYMS(RD_SYMS)) u_block (
    .clk, .wr_en(mem_we), .wr_base(mem_wbase), .wr_data(mem_wdata),
    .rd_addr, .rd_sym
  );

  ws_control #(.N(N)) u_ctl (
    .clk, .rst_n,
    .cmd_bwt, .cmd_lz, .cmd_reset, .cmd_len, .lz_new, .lz_last,
    .busy(ctl_busy), .op_done(ctl_done), .state(ctl_state),
    .ws_op, .ws_dir_right, .ws_in_sym, .ws_in_addr, .ws_ctrl_in,
    .ws_ctrl_load, .ws_ctrl_load_val,
    .ws_out_sym, .ws_out_addr, .ws_ctrl_out, .ws_done,
    .rd_addr, .rd_sym,
    .tg_clear, .tg_step, .tg_force, .tg_tok_valid, .tg_token,
    .res_we, .res_addr, .res_data,
    .bwt_index, .tok_count, .block_len, .phases
  );

  weavesorter #(.N(N)) u_ws (
    .clk, .rst_n,
    .op(ws_op), .dir_right(ws_dir_right),
    .in_sym(ws_in_sym), .in_addr(ws_in_addr), .ctrl_in(ws_ctrl_in),
    .ctrl_load(ws_ctrl_load), .ctrl_load_val(ws_ctrl_load_val),
    .search(rd_sym),
    .out_sym(ws_out_sym), .out_addr(ws_out_addr), .ctrl_out(ws_ctrl_out),
    .done(ws_done), .found
  );

  lz77_token_gen #(.N(N), .LEN_W(LEN_W)) u_tg (
    .clk, .rst_n,
    .clear(tg_clear), .step(tg_step), .force_emit(tg_force),
    .sym(rd_sym), .found,
    .matched(tg_matched), .tok_valid(tg_tok_valid), .token(tg_token)
  );

  result_buf #(.N(N), .WR_SYMS(WR_SYMS)) u_res (
    .clk, .rst_n,
    .we(res_we), .waddr(res_addr), .wdata(res_data),
    .grp(res_grp), .syms(res_syms), .tokens(res_tokens)
  );

endmodule
