// tb_priority_encoder: the encoder must return the highest set position
// (right-most dictionary cell) and valid; checked on one-hot, two-hot and
// random 64-bit vectors and on zero.
module tb_priority_encoder;
  logic [63:0] x; logic [5:0] idx; logic valid;
  int checks = 0, failures = 0;
  int e;
  priority_encoder #(.N(64)) dut (.x, .idx, .valid);
  initial begin
    for (int t = 0; t < 1000; t++) begin
      if (t < 64) x = 64'd1 << t;
      else if (t < 128) x = (64'd1 << (t - 64)) | (64'd1 << $urandom_range(t - 64));
      else if (t == 128) x = '0;
      else x = {32'($urandom), 32'($urandom)} >> $urandom_range(63);
      e = -1;
      for (int i = 0; i < 64; i++) if (x[i]) e = i;
      #1;
      checks++;
      if (valid !== (e >= 0) || (e >= 0 && idx !== 6'(e))) begin
        failures++; $display("FAIL x=%h idx=%0d valid=%b expected %0d", x, idx, valid, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
