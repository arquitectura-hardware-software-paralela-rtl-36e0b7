// result_buf: buffer for the results the host reads back with WriteData.
//
// N words of 32 bits, written one word per cycle by the control unit: the
// last-column symbol of row r in word r after a BWT, or token t in word t
// after LZ77. One WriteData returns 64 bits for group g: in BWT mode the
// symbols of rows 8g .. 8g+7 (row 8g in the most significant byte), in LZ77
// mode tokens 2g and 2g+1 (token 2g in the upper half). Reads are
// combinational. This buffer is an implementation choice: the design only says
// that results are read from the coprocessor, 8 symbols per instruction.
module result_buf #(
  parameter int unsigned N       = 64,
  parameter int unsigned WR_SYMS = 8,
  parameter int unsigned AW      = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] grp,
  output logic [63:0]   syms,      // BWT: WR_SYMS symbols of group grp
  output logic [63:0]   tokens     // LZ77: two tokens of group grp
);
  logic [31:0] mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    syms = '0;
    for (int unsigned j = 0; j < WR_SYMS; j++) begin
      if (int'(grp) * WR_SYMS + j < N)
        syms[(WR_SYMS-1-j)*8 +: 8] = mem[int'(grp) * WR_SYMS + j][7:0];
    end
    tokens = '0;
    if (int'(grp) * 2 + 1 < N)
      tokens = {mem[int'(grp) * 2], mem[int'(grp) * 2 + 1]};
  end

  initial assert (WR_SYMS * 8 == 64) else $error("result_buf: WR_SYMS symbols must fill 64 bits");

endmodule
