// op_mux: operand multiplexer M1/M2 (and M4/M5) of the SCS-MM-New datapath.
//
// The SS and SC registers hold the carry-save adder output before the
// division by two of the Montgomery step.  The shift is applied here, on the
// way back into the adder: by one bit in a normal iteration, by two bits when
// the following iteration is skipped, and not at all while a carry-save pair
// is being converted to binary.  OPSEL_LOAD passes an external operand
// (N^ into the SC side, B^ into the SS side) for D^ = B^ + N^.
// The four-input form is this design's reading of the drawing, which shows
// the loaded operand and the ">>1" and ">>2" taps.  Purely combinational.
module op_mux
  import mm_pkg::*;
#(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] load_val,
  input  logic [W-1:0] reg_val,
  input  opsel_e       sel,
  output logic [W-1:0] out
);
  always_comb begin
    unique case (sel)
      OPSEL_LOAD: out = load_val;
      OPSEL_SH0:  out = reg_val;
      OPSEL_SH1:  out = reg_val >> 1;
      default:    out = reg_val >> 2;
    endcase
  end
endmodule
