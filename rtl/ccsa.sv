// ccsa: one-level configurable carry-save adder, a row of W cfa cells.
//
// alpha = 1 (1F_CSA): (sum, carry) = 3-input carry-save addition of a, b and
//   x, i.e. sum + carry = a + b + x.
// alpha = 0 (2H_CSA): two serial 2-input half-adder stages on a and b; x is
//   ignored and sum + carry = a + b, with the carry chain advanced by two bit
//   positions, so a carry-save pair is turned into binary in half the cycles
//   a single half-adder stage would need.
// The carry vector is returned already aligned: carry[0] = 0 and carry[j+1]
// is the carry out of bit j.  Carries out of bit W-1 are dropped; the user
// sizes W so that they are always zero.  Purely combinational.
module ccsa #(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] x_n,    // inverted third operand from SM3
  input  logic         alpha,  // 1: one full-adder CSA, 0: two half-adder CSAs
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] g;     // generate bits a&b of each cell
  logic [W-1:0] c;     // carry out of each cell
  logic [W-1:0] g_in;  // generate bit of the cell below

  assign g_in = {g[W-2:0], 1'b0};

  for (genvar j = 0; j < W; j++) begin : g_cell
    cfa u_cfa (
      .a    (a[j]),
      .b    (b[j]),
      .x_n  (x_n[j]),
      .g_in (g_in[j]),
      .alpha(alpha),
      .s    (sum[j]),
      .c    (c[j]),
      .g    (g[j])
    );
  end

  assign carry = {c[W-2:0], 1'b0};
endmodule
