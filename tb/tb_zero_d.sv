// tb_zero_d: the zero detector must flag the all-zero vector and every
// vector with a single set bit (each position) or random contents as nonzero.
module tb_zero_d;
  localparam int W = 67;
  logic [W-1:0] v;
  logic         zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.*);

  initial begin
    v = '0; #1;
    checks++; if (zero !== 1'b1) begin failures++; $display("FAIL zero"); end
    for (int i = 0; i < W; i++) begin
      v = '0; v[i] = 1'b1; #1;
      checks++; if (zero !== 1'b0) begin failures++; $display("FAIL bit %0d", i); end
    end
    for (int n = 0; n < 100; n++) begin
      v = {$urandom, $urandom, $urandom} | W'(1 << (n % 30)); #1;
      checks++; if (zero !== 1'b0) begin failures++; $display("FAIL random"); end
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
