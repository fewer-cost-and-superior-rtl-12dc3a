// tb_nhat_gen: checks N^ = N+1 (N mod 4 = 3) or 3N+1 (N mod 4 = 1) on random
// odd moduli, and that N^ is a multiple of 4 and of the form m*N + 1.
module tb_nhat_gen;
  localparam int K = 64;
  logic [K-1:0] n;
  logic [K+1:0] n_hat;
  int checks = 0, failures = 0;

  nhat_gen #(.K(K)) dut (.*);

  initial begin
    logic [K+3:0] e;
    for (int i = 0; i < 500; i++) begin
      n = {$urandom, $urandom} | K'(1);
      if (i == 0) n = '1;
      #1;
      e = (n % 4 == 3) ? (K+4)'(n) + 1 : 3 * (K+4)'(n) + 1;
      checks++;
      if ((K+4)'(n_hat) != e) begin failures++; $display("FAIL n=%h n_hat=%h", n, n_hat); end
      checks++;
      if (n_hat[1:0] != 2'b00) begin failures++; $display("FAIL n_hat not multiple of 4"); end
    end
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
