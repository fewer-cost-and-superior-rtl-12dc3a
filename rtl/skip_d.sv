// skip_d: skip detector Skip_D with quotient precomputation.
//
// In iteration i it sees the three low bits of SS[i] and SC[i], the current
// q^ and N^_2, and the operand bits A_{i+1}, A_{i+2}.  Because every x added
// has x[1:0] = 0 and x[2] = q^ & N^_2:
//   q_{i+1}    = (SS1 ^ SC1) ^ (SS0 & SC0)                      eq. (5)
//   q_{i+2}    = (SS2 ^ SC2) ^ (q^ & N^_2) ^ (SS1 & SC1)         eq. (7)
//   skip_{i+1} = ~(A_{i+1} | (SS1 ^ SC1) | (SS0 & SC0))          eq. (8)
// skip_{i+1} = 1 means iteration i+1 would add x = 0 to an operand pair with
// both low bits zero, a pure shift that is folded into the next cycle's >>2.
// Then q^ <- q_{i+2}, A^ <- A_{i+2}; otherwise q^ <- q_{i+1}, A^ <- A_{i+1}.
// q_{i+2} is only valid (and only used) when skip_{i+1} = 1.
// skip_en is this design's addition: it forbids a skip past the last
// iteration.  Purely combinational; the q^, A^ and skip flip-flops are in
// the multiplier.
module skip_d (
  input  logic [2:0] ss,       // SS[i][2:0]
  input  logic [2:0] sc,       // SC[i][2:0]
  input  logic       q_hat,    // q_i of the current iteration
  input  logic       n_hat2,   // N^[2]
  input  logic       a1,       // A_{i+1}
  input  logic       a2,       // A_{i+2}
  input  logic       skip_en,
  output logic       skip,     // skip_{i+1}
  output logic       q_next,   // next q^
  output logic       a_next    // next A^
);
  logic d1, d0, q1, q2;

  always_comb begin
    d1     = ss[1] ^ sc[1];   // SS[i+1]_0
    d0     = ss[0] & sc[0];   // SC[i+1]_0
    q1     = d1 ^ d0;
    q2     = (ss[2] ^ sc[2]) ^ (q_hat & n_hat2) ^ (ss[1] & sc[1]);
    skip   = skip_en & ~(a1 | d1 | d0);
    q_next = skip ? q2 : q1;
    a_next = skip ? a2 : a1;
  end
endmodule
