// tb_skip_d: exhaustive test of the skip detector.  For every value of the
// three low bits of SS and SC, q^, N^_2, A_{i+1}, A_{i+2} it performs the
// carry-save step of iteration i on those bits with x[1:0] = 0,
// x[2] = q^ & N^_2, shifts by one, and derives from the definitions
//   q_{i+1} = LSB of SS[i+1] + SC[i+1]
//   skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)
//   q_{i+2} = LSB of (SS[i+1] + SC[i+1]) / 2 when skipping
// the expected outputs, and also checks that skip_en = 0 forbids the skip.
module tb_skip_d;
  logic [2:0] ss, sc;
  logic q_hat, n_hat2, a1, a2, skip_en, skip, q_next, a_next;
  int checks = 0, failures = 0, n_skips = 0;

  skip_d dut (.*);

  initial begin
    logic [2:0] x, s3, c3;
    logic [1:0] ss1, sc1;
    logic q1, skip_ref, q2;
    for (int v = 0; v < 2048; v++) begin
      {skip_en, a2, a1, n_hat2, q_hat, sc, ss} = 11'(v);
      #1;
      x   = {q_hat & n_hat2, 2'b00};
      s3  = ss ^ sc ^ x;
      c3  = {(ss[1:0] & sc[1:0]) | (ss[1:0] & x[1:0]) | (sc[1:0] & x[1:0]), 1'b0};
      ss1 = s3[2:1];
      sc1 = c3[2:1];
      q1  = ss1[0] ^ sc1[0];
      skip_ref = skip_en & ~(a1 | q1 | ss1[0]);
      q2  = ss1[1] ^ sc1[1];               // both low bits are 0 when skipping
      checks++;
      if (skip !== skip_ref) begin failures++; $display("FAIL skip v=%0d", v); end
      checks++;
      if (a_next !== (skip_ref ? a2 : a1)) begin failures++; $display("FAIL a v=%0d", v); end
      checks++;
      if (q_next !== (skip_ref ? q2 : q1)) begin failures++; $display("FAIL q v=%0d", v); end
      if (skip_ref) n_skips++;
    end
    checks++;
    if (n_skips == 0) begin failures++; $display("FAIL no skip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
