// tb_op_mux: checks the four settings of the operand multiplexer
// (load, >>0, >>1, >>2) on random values.
module tb_op_mux;
  import mm_pkg::*;
  localparam int W = 48;
  logic [W-1:0] load_val, reg_val, out;
  opsel_e       sel;
  int checks = 0, failures = 0;

  op_mux #(.W(W)) dut (.*);

  initial begin
    logic [W-1:0] e;
    for (int n = 0; n < 200; n++) begin
      load_val = {$urandom, $urandom};
      reg_val  = {$urandom, $urandom};
      for (int s = 0; s < 4; s++) begin
        sel = opsel_e'(s);
        #1;
        case (s)
          0: e = load_val;
          1: e = reg_val;
          2: e = {1'b0, reg_val[W-1:1]};
          default: e = {2'b00, reg_val[W-1:2]};
        endcase
        checks++;
        if (out != e) begin failures++; $display("FAIL sel=%0d", s); end
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
