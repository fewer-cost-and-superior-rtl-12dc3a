// nhat_gen: forms the modified modulus N^ from an odd modulus N.
//
//   N^ = N + 1    if N[1:0] = 2'b11
//   N^ = 3N + 1   if N[1:0] = 2'b01
//
// Either way N^ is a multiple of 4, so every operand the carry-save adder sees
// (0, N^, B^ = 8B, D^ = B^ + N^) has two zero low bits; that is what lets the
// skip detector predict the next quotient bits from the three low bits of
// SS and SC alone.  Adding q*N^ and dropping the odd low bit of SS+SC equals
// adding q*(N^-1), so the multiplier reduces by N or by 3N, both multiples
// of N.  The formula is the document's; computing it in hardware in front of
// the N^ register is this design's choice.  N must be odd; for even N the
// output is meaningless.  Purely combinational.
module nhat_gen #(
  parameter int unsigned K = 1024
) (
  input  logic [K-1:0] n,
  output logic [K+1:0] n_hat
);
  logic [K+1:0] n_ext;

  always_comb begin
    n_ext = {2'b00, n};
    if (n[1]) n_hat = n_ext + 1'b1;
    else      n_hat = (n_ext << 1) + n_ext + 1'b1;
  end
endmodule
