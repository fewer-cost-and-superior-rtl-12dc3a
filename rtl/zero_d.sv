// zero_d: zero detector Zero_D.  zero = 1 when the carry vector SC holds no
// set bit, which ends the carry-propagation loops (D^ = B^ + N^ before the
// multiplication and the final carry-save to binary conversion).  A plain
// W-input NOR; purely combinational.
module zero_d #(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] v,
  output logic         zero
);
  assign zero = ~|v;
endmodule
