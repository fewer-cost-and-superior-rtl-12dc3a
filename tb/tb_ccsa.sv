// tb_ccsa: random test of the configurable carry-save adder row.
// 1F mode: sum + carry must equal a + b + x.  2H mode: sum + carry must equal
// a + b, and the sum/carry vectors must match two explicit half-adder
// stages.  Operands are kept below 2^(W-2) so no carry leaves the row.
module tb_ccsa;
  localparam int W = 70;
  logic [W-1:0] a, b, x_n, sum, carry;
  logic         alpha;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;  // wraps into range
    r[W-1:W-2] = 2'b00;
    return r;
  endfunction

  initial begin
    logic [W-1:0] x, t, gs, s_ref, c_ref;
    for (int n = 0; n < 2000; n++) begin
      a = rnd(); b = rnd(); x = rnd();
      if (n % 7 == 0) begin a = '1 >> 2; b = W'(1); end   // long carry chain
      x_n = ~x;
      alpha = 1'b1; #1;
      checks++;
      if ((W+1)'(sum) + (W+1)'(carry) != (W+1)'(a) + (W+1)'(b) + (W+1)'(x)) begin
        failures++; $display("FAIL 1F n=%0d", n);
      end
      checks++;
      if (carry[0] !== 1'b0) begin failures++; $display("FAIL carry[0]"); end
      alpha = 1'b0; #1;
      t = a ^ b; gs = (a & b) << 1;
      s_ref = t ^ gs; c_ref = (t & gs) << 1;
      checks++;
      if (sum != s_ref || carry != c_ref) begin
        failures++; $display("FAIL 2H vectors n=%0d", n);
      end
      checks++;
      if ((W+1)'(sum) + (W+1)'(carry) != (W+1)'(a) + (W+1)'(b)) begin
        failures++; $display("FAIL 2H value n=%0d", n);
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
