// tb_cfa: exhaustive test of one configurable full-adder cell.  For all 32
// input combinations it checks the full-adder mode (alpha = 1, third addend
// x = ~x_n) and the two-half-adder mode (alpha = 0, third addend is the
// generate bit of the cell below), against arithmetic sums.
module tb_cfa;
  logic a, b, x_n, g_in, alpha, s, c, g;
  int checks = 0, failures = 0;

  cfa dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b x_n=%0b g_in=%0b alpha=%0b -> s=%0b c=%0b g=%0b",
               what, a, b, x_n, g_in, alpha, s, c, g);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      {alpha, g_in, x_n, b, a} = 5'(v);
      #1;
      check(g == (a & b), "generate");
      if (alpha) begin
        // 3-input add: a + b + x = s + 2c
        check(({1'b0, s} + {c, 1'b0}) == (2'(a) + 2'(b) + 2'(!x_n)), "full adder");
      end else begin
        // HA1: a+b = t + 2g ; HA2: t + g_in = s + 2c
        check(({1'b0, s} + {c, 1'b0}) == (2'(a ^ b) + 2'(g_in)), "half adder 2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
