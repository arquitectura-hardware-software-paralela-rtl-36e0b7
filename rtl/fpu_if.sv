// fpu_if: instruction interface of the coprocessor on the processor's FPU port.
//
// The coprocessor takes the place of the floating-point unit, so it is driven
// by SPARC V8 FPops. Five of them are decoded (opf field):
//   FADDd  ReadData          op1,op2 carry 16 symbols (op1[63:56] first); they
//                            are written to the block register at the next
//                            free position (0, 16, 32, ...).
//   FSQRTd ExecuteBWT        op2[CW-1:0] = block length m (0: the number of
//                            symbols loaded); busy until the BWT is complete.
//   FSQRTs ExecuteLZ77       op2[7:0] = symbol count (0: number loaded),
//                            op2[8] = new stream (clear dictionary),
//                            op2[9] = last block (flush the open match).
//   FSUBd  WriteData         op1[AW-1:0] = group g; returns 8 last-column
//                            symbols (BWT) or 2 tokens (LZ77). With op1[63]
//                            set it returns status: {token count, BWT index I,
//                            block length, phases}, 16 bits each.
//   FMULd  ResetCoprocessor  control unit to Reset, block register emptied.
// Any other opf completes with a zero result.
// Handshake: fp_start is a one-cycle issue strobe, accepted when fp_busy is
// low; fp_busy stays high until the one-cycle fp_rdy pulse, which carries
// fp_res. ReadData, WriteData and ResetCoprocessor complete in 2 cycles; the
// execute instructions complete one cycle after the control unit finishes.
// The instruction mapping follows the design; the signal-level handshake, the
// operand fields and the status word are this implementation's choices, since
// the interface of the processor's FPU port is not specified there.
module fpu_if
  import bwtlz_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned RD_SYMS = 16,
  parameter int unsigned AW      = $clog2(N),
  parameter int unsigned CW      = AW + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // FPU port
  input  logic                     fp_start,
  input  logic [8:0]               fp_opf,
  input  logic [63:0]              fp_op1,
  input  logic [63:0]              fp_op2,
  output logic                     fp_busy,
  output logic                     fp_rdy,
  output logic [63:0]              fp_res,
  // block register write port
  output logic                     mem_we,
  output logic [AW-1:0]            mem_wbase,
  output logic [RD_SYMS*SYM_W-1:0] mem_wdata,
  // control unit
  output logic                     cmd_bwt,
  output logic                     cmd_lz,
  output logic                     cmd_reset,
  output logic [CW-1:0]            cmd_len,
  output logic                     lz_new,
  output logic                     lz_last,
  input  logic                     ctl_done,
  // result buffer and status
  output logic [AW-1:0]            res_grp,
  input  logic [63:0]              res_syms,
  input  logic [63:0]              res_tokens,
  input  logic [AW-1:0]            bwt_index,
  input  logic [CW-1:0]            tok_count,
  input  logic [CW-1:0]            block_len,
  input  logic [CW-1:0]            phases
);

  logic [CW-1:0] loaded;       // symbols written since the last reset
  logic          lz_mode;      // last execute instruction was LZ77
  logic          wait_ctl;     // an execute instruction is in progress
  logic          accept;
  logic [CW-1:0] req_len;

  assign accept    = fp_start && !fp_busy;
  assign res_grp   = fp_op1[AW-1:0];
  assign mem_we    = accept && (fp_opf == OPF_FADDD) && (loaded < CW'(N));
  assign mem_wbase = AW'(loaded);
  assign mem_wdata = {fp_op1, fp_op2};
  assign req_len   = (fp_opf == OPF_FSQRTS) ? CW'(fp_op2[7:0]) : fp_op2[CW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_busy   <= 1'b0;
      fp_rdy    <= 1'b0;
      fp_res    <= '0;
      loaded    <= '0;
      lz_mode   <= 1'b0;
      wait_ctl  <= 1'b0;
      cmd_bwt   <= 1'b0;
      cmd_lz    <= 1'b0;
      cmd_reset <= 1'b0;
      cmd_len   <= '0;
      lz_new    <= 1'b0;
      lz_last   <= 1'b0;
    end else begin
      fp_rdy    <= 1'b0;
      cmd_bwt   <= 1'b0;
      cmd_lz    <= 1'b0;
      cmd_reset <= 1'b0;
      if (accept) begin
        fp_busy <= 1'b1;
        fp_res  <= '0;
        unique case (fp_opf)
          OPF_FADDD: begin
            if (loaded < CW'(N)) loaded <= loaded + CW'(RD_SYMS);
            fp_rdy <= 1'b1;
          end
          OPF_FSQRTD, OPF_FSQRTS: begin
            cmd_bwt  <= (fp_opf == OPF_FSQRTD);
            cmd_lz   <= (fp_opf == OPF_FSQRTS);
            cmd_len  <= (req_len == '0) ? loaded : req_len;
            lz_new   <= fp_op2[8];
            lz_last  <= fp_op2[9];
            lz_mode  <= (fp_opf == OPF_FSQRTS);
            wait_ctl <= 1'b1;
          end
          OPF_FSUBD: begin
            if (fp_op1[63])
              fp_res <= {16'(tok_count), 16'(bwt_index), 16'(block_len), 16'(phases)};
            else
              fp_res <= lz_mode ? res_tokens : res_syms;
            fp_rdy <= 1'b1;
          end
          OPF_FMULD: begin
            cmd_reset <= 1'b1;
            loaded    <= '0;
            fp_rdy    <= 1'b1;
          end
          default: fp_rdy <= 1'b1;
        endcase
      end else if (wait_ctl) begin
        if (ctl_done) begin
          wait_ctl <= 1'b0;
          fp_rdy   <= 1'b1;
        end
      end else if (fp_rdy) begin
        fp_busy <= 1'b0;
      end
    end
  end

  initial assert (RD_SYMS * SYM_W == 128) else $error("fpu_if: ReadData carries two 64-bit operands");

endmodule
