// priority_encoder: position encoder of the LZ77 token generator.
//
// Returns the index of the highest-numbered set input, i.e. the right-most
// dictionary cell, which holds the most recent symbols and so gives the
// smallest offset T_o. valid is low when no input is set (idx is then 0).
// Combinational. Giving priority to the right-most position follows the
// design; the encoding style is this implementation's.
module priority_encoder #(
  parameter int unsigned N  = 64,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic [N-1:0]  x,
  output logic [AW-1:0] idx,
  output logic          valid
);
  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      if (x[i]) begin
        idx   = AW'(i);
        valid = 1'b1;
      end
    end
  end
endmodule
