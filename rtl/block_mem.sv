// block_mem: the register that holds the block being compressed.
//
// N symbols, one per address. The host writes RD_SYMS symbols at a time
// (one ReadData instruction carries 16 symbols in two 64-bit operands); the
// first symbol of a write is in the most significant byte of wr_data. One
// combinational read port (an N-to-1 multiplexer) serves the control unit:
// the successor lookup while sorting, the last-column lookup while collecting
// results, and the symbol stream in LZ77 mode. Write takes effect at the clock
// edge. The block register and its N-to-1 read multiplexer follow the design;
// the write grouping and byte order are this implementation's choices.
module block_mem
  import bwtlz_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned RD_SYMS = 16,
  parameter int unsigned AW      = $clog2(N)
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_base,   // address of the first symbol written
  input  logic [RD_SYMS*SYM_W-1:0] wr_data,
  input  logic [AW-1:0]            rd_addr,
  output sym_t                     rd_sym
);

  sym_t mem [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int unsigned j = 0; j < RD_SYMS; j++) begin
        if (int'(wr_base) + j < N)
          mem[int'(wr_base) + j] <= wr_data[(RD_SYMS-1-j)*SYM_W +: SYM_W];
      end
    end
  end

  assign rd_sym = mem[rd_addr];

  initial assert (N % RD_SYMS == 0) else $error("block_mem: N must be a multiple of RD_SYMS");

endmodule
