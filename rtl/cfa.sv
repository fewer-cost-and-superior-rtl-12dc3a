// cfa: one bit of the configurable carry-save adder (CCSA).
//
// With alpha = 1 the cell is a full adder on (a, b, x): it is one bit of a
// three-input carry-save addition.  With alpha = 0 the third input is
// replaced by the "generate" bit a&b of the neighbouring lower cell, so that a
// row of cells forms two serial half-adder stages (HA1 on a, b; HA2 on the HA1
// sum and the HA1 carry from below): two steps of carry propagation per clock.
// The x operand arrives inverted (x_n), as the simplified multiplexer SM3
// produces it.  The mode split and the inverted x input follow the document;
// the exact gate network is this design's own, written as equations.
//
// Ports: a, b, x_n, g_in (a&b of cell j-1), alpha -> s (sum bit j),
//        c (carry into bit j+1), g (a&b, to cell j+1).  Purely combinational.
module cfa (
  input  logic a,
  input  logic b,
  input  logic x_n,
  input  logic g_in,
  input  logic alpha,
  output logic s,
  output logic c,
  output logic g
);
  logic t;      // HA1 sum, a xor b
  logic third;  // third addend: x (full-adder mode) or HA1 carry from below

  always_comb begin
    t     = a ^ b;
    g     = a & b;
    third = alpha ? ~x_n : g_in;
    s     = t ^ third;
    // full adder: a&b | t&x ; two half adders: only the HA2 carry t&g_in
    // leaves as carry, HA1's carry g goes sideways to the next cell
    c     = (alpha & g) | (t & third);
  end
endmodule
