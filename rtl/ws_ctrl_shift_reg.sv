// ws_ctrl_shift_reg: the ControlShiftRegister of the Weavesorter plus its Done gate.
//
// One control bit per cell. In BWT mode bit i set means "a group boundary lies
// on the left side of cell i": the compare/swap unit whose right cell is i is
// then blocked. The bits shift together with the cell contents but never take
// part in a swap, so a boundary stays at its position inside a group while the
// symbols of the group are reordered. Done is the AND of all bits: every symbol
// is separated from its neighbours and the sort is complete.
//
// Shift right (new symbol enters cell 0): bit 1 takes ctrl_in, the boundary
// between the new symbol and the one it pushed to cell 1; bit 0 is the left
// edge and is set. Shift left (new symbol enters cell N-1): bit N-1 takes
// ctrl_in, the boundary between the new symbol and the one in cell N-2.
// load forces every bit to load_val (all ones before a BWT run; all zeros
// clears the LZ77 dictionary, where the bits serve as "cell valid" flags).
// The register and the AND gate follow the design; where ctrl_in lands on a
// right shift, and the reuse as valid flags for LZ77, are this
// implementation's choices.
module ws_ctrl_shift_reg
  import bwtlz_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ws_op_e       op,
  input  logic         ctrl_in,
  input  logic         load,
  input  logic         load_val,
  output logic [N-1:0] ctrl,
  output logic         done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '1;
    end else if (load) begin
      ctrl <= {N{load_val}};
    end else begin
      unique case (op)
        WS_SHIFT_R: ctrl <= {ctrl[N-2:1], ctrl_in, 1'b1};
        WS_SHIFT_L: ctrl <= {ctrl_in, ctrl[N-1:1]};
        default:    ;
      endcase
    end
  end

  assign done = &ctrl;

endmodule
