// a_shifter: the multiplier-operand register A.
//
// Loaded with A, it always presents the next two bits the Montgomery loop
// needs, A_{i+1} (a1) and A_{i+2} (a2), and advances by one bit after a
// normal iteration or by two after a skipped one.  Zeros are shifted in, so
// the bits beyond the operand read as 0 (the loop runs past the top bit).
// The shift-register form is this design's choice.
//
// Timing: load and shift act on the rising clock edge; load wins.
module a_shifter #(
  parameter int unsigned AW = 1025
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] a_in,
  input  logic          shift,   // advance this cycle
  input  logic          by_two,  // advance by two bits instead of one
  output logic          a1,      // A_{i+1}
  output logic          a2       // A_{i+2}
);
  logic [AW-1:0] a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     a_q <= '0;
    else if (load)  a_q <= a_in;
    else if (shift) a_q <= by_two ? (a_q >> 2) : (a_q >> 1);
  end

  assign a1 = a_q[0];
  assign a2 = a_q[1];
endmodule
