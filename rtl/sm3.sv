// sm3: simplified multiplexer SM3 choosing the CSA's third operand x.
//
//   (A^, q^) = (0,0) -> 0   (0,1) -> N^   (1,0) -> B^   (1,1) -> D^ = B^ + N^
//
// As in the document's drawing it is built from a 2:1 multiplexer between
// B^ and D^ (selected by q^), N^ gated by q^, and a final 2:1 multiplexer
// selected by A^; the output is inverted (~x), which the CFA cells expect.
// Purely combinational.
module sm3 #(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] n_hat,
  input  logic [W-1:0] b_hat,
  input  logic [W-1:0] d_hat,
  input  logic         q_hat,
  input  logic         a_hat,
  output logic [W-1:0] x_n
);
  logic [W-1:0] bd;  // B^ or D^
  logic [W-1:0] nq;  // N^ or 0

  always_comb begin
    bd  = q_hat ? d_hat : b_hat;
    nq  = n_hat & {W{q_hat}};
    x_n = ~(a_hat ? bd : nq);
  end
endmodule
