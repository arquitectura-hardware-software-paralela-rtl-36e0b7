// tb_fpu_if: the instruction interface with the control unit and result
// buffer replaced by models here. Checks the decoding of the five FPops:
// ReadData writes 16 symbols at 0, 16, 32, 48 and completes in 2 cycles;
// ExecuteBWT/ExecuteLZ77 pulse their command with the right length and
// flags (loaded count when the operand is 0) and complete one cycle after the
// control unit reports done, staying busy until then; WriteData returns the
// symbol group after a BWT, the token pair after LZ77, or the status word;
// ResetCoprocessor pulses the reset command and empties the block; any other
// opf completes with zero. A second instruction is not accepted while busy.
module tb_fpu_if;
  import bwtlz_pkg::*;
  localparam int N = 64, AW = 6, CW = 7;
  logic clk = 0, rst_n, fp_start, fp_busy, fp_rdy;
  logic [8:0] fp_opf; logic [63:0] fp_op1, fp_op2, fp_res;
  logic mem_we; logic [AW-1:0] mem_wbase; logic [127:0] mem_wdata;
  logic cmd_bwt, cmd_lz, cmd_reset, lz_new, lz_last, ctl_done;
  logic [CW-1:0] cmd_len, tok_count, block_len, phases;
  logic [AW-1:0] res_grp, bwt_index; logic [63:0] res_syms, res_tokens;
  int checks = 0, failures = 0;
  int n_bwt = 0, n_lz = 0, n_rst = 0, last_len, last_new, last_last, n_we = 0;
  int done_delay = -1;

  fpu_if #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // models of the result buffer and the control unit
  assign res_syms   = {8{2'b00, res_grp}};
  assign res_tokens = {32'hAAAA_0000 | 32'(res_grp), 32'h5555_0000 | 32'(res_grp)};
  assign bwt_index  = 6'd37;
  assign tok_count  = 7'd9;
  assign block_len  = 7'd64;
  assign phases     = 7'd5;
  always @(posedge clk) if (rst_n) begin
    ctl_done <= 1'b0;
    if (cmd_bwt) begin n_bwt++; last_len = cmd_len; done_delay = 20; end
    if (cmd_lz)  begin n_lz++;  last_len = cmd_len; last_new = lz_new; last_last = lz_last; done_delay = 7; end
    if (cmd_reset) n_rst++;
    if (done_delay == 0) ctl_done <= 1'b1;
    if (done_delay >= 0) done_delay--;
  end

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic issue(input logic [8:0] opf, input logic [63:0] op1, input logic [63:0] op2,
                       output logic [63:0] res, output int cyc);
    while (fp_busy) @(posedge clk);
    fp_opf <= opf; fp_op1 <= op1; fp_op2 <= op2; fp_start <= 1;
    @(posedge clk);
    fp_start <= 0;
    cyc = 1;
    #1;
    if (opf == OPF_FADDD) begin
      n_we++;
    end
    while (!fp_rdy) begin @(posedge clk); #1 cyc++; end
    res = fp_res;
    chk(fp_busy, "busy while result is presented");
  endtask

  initial begin
    logic [63:0] r; int cyc; logic [127:0] d;
    rst_n = 0; fp_start = 0; fp_opf = 0; fp_op1 = 0; fp_op2 = 0; ctl_done = 0;
    @(posedge clk); #1 rst_n = 1;
    // ReadData x4: watch the write strobes
    for (int g = 0; g < 4; g++) begin
      d = {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
      fp_opf = OPF_FADDD; fp_op1 = d[127:64]; fp_op2 = d[63:0]; fp_start = 1;
      #1;
      chk(mem_we && mem_wbase == 6'(g*16) && mem_wdata == d, $sformatf("ReadData %0d write port", g));
      @(posedge clk); #1 fp_start = 0;
      chk(fp_rdy && fp_busy, "ReadData completes after one cycle");
      fp_start = 1; fp_opf = 9'h001; #1;
      chk(!mem_we, "no instruction accepted while busy");
      fp_start = 0;
      @(posedge clk); #1;
      chk(!fp_busy, "ReadData: free after 2 cycles");
    end
    // ExecuteBWT with operand 0 takes the loaded count
    issue(OPF_FSQRTD, 0, 0, r, cyc);
    chk(n_bwt == 1 && last_len == 64, $sformatf("ExecuteBWT command, len %0d", last_len));
    chk(cyc == 23, $sformatf("ExecuteBWT completes one cycle after done (%0d)", cyc));
    issue(OPF_FSUBD, 64'd3, 0, r, cyc);
    chk(r == {8{8'd3}}, "WriteData after BWT returns symbol group");
    issue(OPF_FSUBD, 64'h8000_0000_0000_0000, 0, r, cyc);
    chk(r == {16'd9, 16'd37, 16'd64, 16'd5}, $sformatf("status word %h", r));
    // ExecuteBWT with explicit length
    issue(OPF_FSQRTD, 0, 64'd21, r, cyc);
    chk(n_bwt == 2 && last_len == 21, "ExecuteBWT explicit length");
    // ExecuteLZ77 with flags
    issue(OPF_FSQRTS, 0, 64'h0000_0000_0000_0328, r, cyc);
    chk(n_lz == 1 && last_len == 40 && last_new == 1 && last_last == 1, $sformatf("ExecuteLZ77 operand fields %0d %0d %0d %0d", n_lz, last_len, last_new, last_last));
    issue(OPF_FSQRTS, 0, 64'h0000_0000_0000_0100, r, cyc);
    chk(n_lz == 2 && last_len == 64 && last_new == 1 && last_last == 0, "ExecuteLZ77 default count");
    issue(OPF_FSUBD, 64'd5, 0, r, cyc);
    chk(r == {32'hAAAA_0005, 32'h5555_0005}, "WriteData after LZ77 returns token pair");
    // ResetCoprocessor empties the block
    issue(OPF_FMULD, 0, 0, r, cyc);
    @(posedge clk); #1;
    chk(n_rst == 1 && cyc == 1, $sformatf("ResetCoprocessor %0d %0d", n_rst, cyc));
    issue(OPF_FSQRTD, 0, 0, r, cyc);
    chk(last_len == 0, "block empty after ResetCoprocessor");
    issue(9'h0C9, 64'hFFFF, 64'hFFFF, r, cyc);
    chk(r == 0 && cyc == 1, "unknown opf completes with zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
