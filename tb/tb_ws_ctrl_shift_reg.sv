// tb_ws_ctrl_shift_reg: random shifts, loads and holds applied to the
// ControlShiftRegister (64 bits), compared with a bit-level model: shift right
// sets bit 0 and puts ctrl_in in bit 1, shift left puts ctrl_in in bit N-1,
// load fills every bit. Done must equal the AND of all bits; runs of ones are
// forced now and then so that Done is seen high as well as low.
module tb_ws_ctrl_shift_reg;
  import bwtlz_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n, ctrl_in, load, load_val, done;
  ws_op_e op;
  logic [N-1:0] ctrl, model;
  int checks = 0, failures = 0, n_done = 0;

  ws_ctrl_shift_reg #(.N(N)) dut (.clk, .rst_n, .op, .ctrl_in, .load, .load_val, .ctrl, .done);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rst_n = 0; op = WS_HOLD; ctrl_in = 0; load = 0; load_val = 0;
    @(posedge clk); #1 rst_n = 1;
    model = '1;
    checks++; if (ctrl !== model) begin failures++; $display("reset value"); end
    for (int t = 0; t < 4000; t++) begin
      op = ws_op_e'($urandom_range(3));
      ctrl_in = (t % 500 < 150) ? 1'b1 : 1'($urandom);
      load = ($urandom_range(40) == 0);
      load_val = $urandom;
      if (load) model = {N{load_val}};
      else if (op == WS_SHIFT_R) model = {model[N-2:1], ctrl_in, 1'b1};
      else if (op == WS_SHIFT_L) model = {ctrl_in, model[N-1:1]};
      @(posedge clk); #1;
      checks++;
      if (ctrl !== model) begin failures++; if (failures < 5) $display("t=%0d ctrl %h expected %h", t, ctrl, model); end
      checks++;
      if (done !== (&model)) begin failures++; $display("done mismatch"); end
      if (done) n_done++;
    end
    checks++; if (n_done == 0) begin failures++; $display("Done never high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
