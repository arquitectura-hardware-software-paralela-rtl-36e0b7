// tb_block_mem: loads 64 symbols in four 16-symbol writes (first symbol in the
// most significant byte) and reads every address back; then overwrites one
// group and checks that only that group changed.
module tb_block_mem;
  import bwtlz_pkg::*;
  logic clk = 0, wr_en; logic [5:0] wr_base, rd_addr; logic [127:0] wr_data; sym_t rd_sym;
  byte unsigned ref_mem [64];
  int checks = 0, failures = 0;
  block_mem #(.N(64), .RD_SYMS(16)) dut (.clk, .wr_en, .wr_base, .wr_data, .rd_addr, .rd_sym);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic write_grp(input int g);
    for (int j = 0; j < 16; j++) begin
      ref_mem[g*16+j] = $urandom;
      wr_data[(15-j)*8 +: 8] = ref_mem[g*16+j];
    end
    wr_base = 6'(g*16); wr_en = 1;
    @(posedge clk); #1 wr_en = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < 64; a++) begin
      rd_addr = 6'(a); #1;
      checks++;
      if (rd_sym !== ref_mem[a]) begin failures++; $display("addr %0d: %h expected %h", a, rd_sym, ref_mem[a]); end
    end
  endtask

  initial begin
    wr_en = 0; wr_data = '0; wr_base = 0; rd_addr = 0;
    @(posedge clk); #1;
    for (int g = 0; g < 4; g++) write_grp(g);
    read_all();
    write_grp(2);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
