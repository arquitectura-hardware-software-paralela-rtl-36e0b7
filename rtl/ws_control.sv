// ws_control: control unit of the coprocessor (the FSM that operates the
// Weavesorter machine and streams LZ77 symbols).
//
// States: Reset, ShiftRight, CompareSwap, ShiftLeft, GetResults and LZ77.
// Reset waits for a command. ExecuteBWT sets every control bit, then the FSM
// alternates a shift with a compare/swap, m times per phase (m = block length),
// so a phase lasts 2m cycles. Phase 1 shifts the block into the Weavesorter
// from the left. Each later phase reverses the direction: the previous column
// drains out of one end in sorted order and, in the same cycle, the successor
// of the symbol leaving (address + 1, modulo m) is read from the block
// register and shifted in at the other end. The control bit sent with it is 1
// when it starts a new group: first symbol of the column, the leaving symbol
// differs from the one before it, or the two leaving symbols were already in
// different groups (given by the control bit that leaves with them). When a
// phase ends with Done (all control bits set), the order is final; the FSM
// then enters GetResults and shifts the column out once more, without
// compare/swap, m cycles. For each row it looks up the last-column symbol
// S[(address - p) mod m], p being the number of columns inserted, writes it to
// the result buffer, and records the row whose rotation starts at address 0
// (the BWT index I). A run also ends after m + 1 phases, when the block
// consists of repeated identical rotations and Done can never rise.
// Cycles for one ExecuteBWT: 1 (command) + 2m * phases + m.
//
// ExecuteLZ77 enters the LZ77 state and processes one symbol per cycle: the
// symbol is read from the block register, presented to the cells as Search,
// to the token generator, and shifted into the dictionary from the right; a
// token that comes out is written to the result buffer.
// The states and their order follow the design's FSM diagrams; the exact
// decision points, the group rule for the control bit, the iteration limit and
// the command operands are this implementation's.
module ws_control
  import bwtlz_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned AW = $clog2(N),
  parameter int unsigned CW = AW + 1          // counts 0 .. 2N-1
) (
  input  logic          clk,
  input  logic          rst_n,
  // commands (one-cycle pulses)
  input  logic          cmd_bwt,
  input  logic          cmd_lz,
  input  logic          cmd_reset,
  input  logic [CW-1:0] cmd_len,            // block length m (BWT) or symbol count (LZ77)
  input  logic          lz_new,             // clear the dictionary first
  input  logic          lz_last,            // the block ends the stream
  output logic          busy,
  output logic          op_done,            // pulse: operation finished
  output ctl_state_e    state,
  // Weavesorter
  output ws_op_e        ws_op,
  output logic          ws_dir_right,
  output sym_t          ws_in_sym,
  output logic [AW-1:0] ws_in_addr,
  output logic          ws_ctrl_in,
  output logic          ws_ctrl_load,
  output logic          ws_ctrl_load_val,
  input  sym_t          ws_out_sym,
  input  logic [AW-1:0] ws_out_addr,
  input  logic          ws_ctrl_out,
  input  logic          ws_done,
  // block register read port
  output logic [AW-1:0] rd_addr,
  input  sym_t          rd_sym,
  // token generator
  output logic          tg_clear,
  output logic          tg_step,
  output logic          tg_force,
  input  logic          tg_tok_valid,
  input  token_t        tg_token,
  // result buffer write port
  output logic          res_we,
  output logic [AW-1:0] res_addr,
  output logic [31:0]   res_data,
  // status
  output logic [AW-1:0] bwt_index,
  output logic [CW-1:0] tok_count,
  output logic [CW-1:0] block_len,
  output logic [CW-1:0] phases
);

  logic          dir_right;
  logic [CW-1:0] k;
  logic [CW-1:0] m;
  logic [CW-1:0] p;
  sym_t          prev_sym;
  logic          prev_bit;
  logic          dict_valid;
  logic          last_r;

  logic [AW-1:0] succ;
  logic          grp_change;
  logic [AW-1:0] row;
  logic [AW-1:0] last_col_addr;
  logic [AW-1:0] start_addr;
  logic          phase_end;
  logic          sort_done;

  function automatic logic [AW-1:0] mod_m(input logic [CW+1:0] x, input logic [CW-1:0] mm);
    logic [CW+1:0] r;
    r = x;
    if (r >= (CW+2)'(mm)) r = r - (CW+2)'(mm);
    if (r >= (CW+2)'(mm)) r = r - (CW+2)'(mm);
    return AW'(r);
  endfunction

  assign busy      = (state != ST_RESET);
  assign block_len = m;
  assign phases    = p;

  // ---- datapath around the Weavesorter ----
  assign succ          = (CW'(ws_out_addr) == m - 1'b1) ? '0 : ws_out_addr + 1'b1;
  assign grp_change    = dir_right ? prev_bit : ws_ctrl_out;
  assign row           = dir_right ? AW'(m - 1'b1 - k) : AW'(k);
  assign last_col_addr = mod_m((CW+2)'(ws_out_addr) + (CW+2)'({m, 1'b0}) - (CW+2)'(p), m);
  assign start_addr    = mod_m((CW+2)'(ws_out_addr) + (CW+2)'({m, 1'b0}) - (CW+2)'(p) + 1'b1, m);
  assign phase_end     = (k == m);
  assign sort_done     = (p >= CW'(2)) && (ws_done || p == m + 1'b1);

  always_comb begin
    ws_op            = WS_HOLD;
    ws_dir_right     = dir_right;
    ws_in_sym        = rd_sym;
    ws_in_addr       = '0;
    ws_ctrl_in       = 1'b1;
    ws_ctrl_load     = 1'b0;
    ws_ctrl_load_val = 1'b1;
    rd_addr          = AW'(k);
    tg_clear         = 1'b0;
    tg_step          = 1'b0;
    tg_force         = 1'b0;
    res_we           = 1'b0;
    res_addr         = '0;
    res_data         = '0;
    unique case (state)
      ST_RESET: begin
        if (cmd_bwt) begin
          ws_ctrl_load     = 1'b1;
          ws_ctrl_load_val = 1'b1;
        end else if (cmd_lz && (lz_new || !dict_valid)) begin
          ws_ctrl_load     = 1'b1;
          ws_ctrl_load_val = 1'b0;
          tg_clear         = 1'b1;
        end
      end
      ST_SHIFT_RIGHT, ST_SHIFT_LEFT: begin
        ws_op = dir_right ? WS_SHIFT_R : WS_SHIFT_L;
        if (p == CW'(1)) begin
          rd_addr    = AW'(k);
          ws_in_addr = AW'(k);
          ws_ctrl_in = (k == '0);
        end else begin
          rd_addr    = succ;
          ws_in_addr = succ;
          ws_ctrl_in = (k == '0) || grp_change || (ws_out_sym != prev_sym);
        end
      end
      ST_COMPARE_SWAP: ws_op = WS_CMP;
      ST_GET_RESULTS: begin
        ws_op    = dir_right ? WS_SHIFT_R : WS_SHIFT_L;
        rd_addr  = last_col_addr;
        res_we   = 1'b1;
        res_addr = row;
        res_data = 32'(rd_sym);
      end
      ST_LZ77: begin
        ws_op    = WS_SHIFT_L;
        rd_addr  = AW'(k);
        tg_step  = 1'b1;
        tg_force = last_r && (k == m - 1'b1);
        res_we   = tg_tok_valid;
        res_addr = AW'(tok_count);
        res_data = 32'(tg_token);
      end
      default: ;
    endcase
  end

  // ---- state machine ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_RESET;
      dir_right  <= 1'b1;
      k          <= '0;
      m          <= CW'(N);
      p          <= '0;
      prev_sym   <= '0;
      prev_bit   <= 1'b0;
      dict_valid <= 1'b0;
      last_r     <= 1'b0;
      bwt_index  <= '0;
      tok_count  <= '0;
      op_done    <= 1'b0;
    end else begin
      op_done <= 1'b0;
      if (cmd_reset) begin
        state <= ST_RESET;
      end else begin
        unique case (state)
          ST_RESET: begin
            if (cmd_bwt) begin
              m          <= (cmd_len < CW'(2) || cmd_len > CW'(N)) ? CW'(N) : cmd_len;
              p          <= CW'(1);
              k          <= '0;
              dir_right  <= 1'b1;
              dict_valid <= 1'b0;
              bwt_index  <= '0;
              state      <= ST_SHIFT_RIGHT;
            end else if (cmd_lz) begin
              m          <= (cmd_len > CW'(N)) ? CW'(N) : cmd_len;
              k          <= '0;
              last_r     <= lz_last;
              dict_valid <= 1'b1;
              tok_count  <= '0;
              if (cmd_len == '0) op_done <= 1'b1;
              else               state   <= ST_LZ77;
            end
          end
          ST_SHIFT_RIGHT, ST_SHIFT_LEFT: begin
            prev_sym <= ws_out_sym;
            prev_bit <= ws_ctrl_out;
            k        <= k + 1'b1;
            state    <= ST_COMPARE_SWAP;
          end
          ST_COMPARE_SWAP: begin
            if (phase_end) begin
              k         <= '0;
              dir_right <= !dir_right;
              if (sort_done) begin
                state <= ST_GET_RESULTS;
              end else begin
                p     <= p + 1'b1;
                state <= dir_right ? ST_SHIFT_LEFT : ST_SHIFT_RIGHT;
              end
            end else begin
              state <= dir_right ? ST_SHIFT_RIGHT : ST_SHIFT_LEFT;
            end
          end
          ST_GET_RESULTS: begin
            if (start_addr == '0) bwt_index <= row;
            k <= k + 1'b1;
            if (k == m - 1'b1) begin
              state   <= ST_RESET;
              op_done <= 1'b1;
            end
          end
          ST_LZ77: begin
            if (tg_tok_valid) tok_count <= tok_count + 1'b1;
            k <= k + 1'b1;
            if (k == m - 1'b1) begin
              state   <= ST_RESET;
              op_done <= 1'b1;
            end
          end
          default: state <= ST_RESET;
        endcase
      end
    end
  end

endmodule
