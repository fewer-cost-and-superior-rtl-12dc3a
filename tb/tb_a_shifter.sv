// tb_a_shifter: loads random operands, advances by random one- or two-bit
// steps and checks that a1/a2 always show the bits at the tracked position
// (0 beyond the operand).
module tb_a_shifter;
  localparam int AW = 45;
  logic          clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, by_two = 1'b0;
  logic [AW-1:0] a_in;
  logic          a1, a2;
  int checks = 0, failures = 0, cycles = 0;

  a_shifter #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic bit_at(logic [AW-1:0] v, int p);
    return (p < AW) ? v[p] : 1'b0;
  endfunction

  initial begin
    int pos;
    a_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      a_in = {$urandom, $urandom}; load = 1'b1;
      @(negedge clk);
      load = 1'b0; pos = 0;
      while (pos < AW + 3) begin
        checks++;
        if (a1 !== bit_at(a_in, pos) || a2 !== bit_at(a_in, pos + 1)) begin
          failures++; $display("FAIL pos=%0d", pos);
        end
        shift = ($urandom % 4) != 0; by_two = $urandom % 2;
        @(negedge clk);
        if (shift) pos += by_two ? 2 : 1;
        shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
