// tb_sm3: checks the SM3 selection table (A^,q^) = 00 -> 0, 01 -> N^,
// 10 -> B^, 11 -> D^ with an inverted output, on random operands.
module tb_sm3;
  localparam int W = 40;
  logic [W-1:0] n_hat, b_hat, d_hat, x_n;
  logic         q_hat, a_hat;
  int checks = 0, failures = 0;

  sm3 #(.W(W)) dut (.*);

  initial begin
    logic [W-1:0] exp_x;
    for (int n = 0; n < 200; n++) begin
      n_hat = {$urandom, $urandom};
      b_hat = {$urandom, $urandom};
      d_hat = {$urandom, $urandom};
      for (int s = 0; s < 4; s++) begin
        {a_hat, q_hat} = 2'(s);
        #1;
        case (s)
          0: exp_x = '0;
          1: exp_x = n_hat;
          2: exp_x = b_hat;
          default: exp_x = d_hat;
        endcase
        checks++;
        if (x_n != ~exp_x) begin
          failures++; $display("FAIL sel=%0d", s);
        end
      end
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
