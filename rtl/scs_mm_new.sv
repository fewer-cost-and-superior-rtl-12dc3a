// scs_mm_new: low-cost radix-2 Montgomery modular multiplier (SCS-MM-New).
//
// Computes S = A * B * 2^-(K+2) mod N, returned as a binary number in the
// range [0, 2^(K+2)) and congruent to that value (not fully reduced).
// The whole datapath has a single carry-save adder row (CCSA) of W = K+6
// configurable cells, shared by three phases:
//
//   1. D^ = B^ + N^, with B^ = 8B and N^ from nhat_gen: one 3-input CSA,
//      then 2-half-adder passes until the carry vector is zero.
//   2. The Montgomery loop for i = -1 .. K+4: (SS,SC) += x, x chosen by
//      (A^, q^) among 0, N^, B^, D^ (SM3); the division by two is a right
//      shift on the way back into the adder.  The skip detector predicts the
//      next quotient bit and, when iteration i+1 would add 0 to an even pair,
//      folds it into a shift by two (skip), saving a clock cycle.
//   3. The result pair is converted to binary by 2-half-adder passes until
//      the carry vector is zero (Zero_D); SS then holds the result.
//
// Because B^ = 8B, the loop runs K+5 real iterations to divide out the
// extra 2^3, so the result carries the factor 2^-(K+2).  Inputs: A and B
// below 2^(K+1) (e.g. below 2N), N odd with K bits.
//
// Interface: pulse start for one cycle while idle with a, b, n valid; they
// are captured then.  busy is high until done pulses for one cycle; result
// holds the product from done until the next start.
// Timing: 1 cycle for B^+N^, p1+1 carry-propagation cycles, K+6 minus the
// number of skips loop cycles, then 1 + p2 + 1 conversion cycles, where
// p1/p2 are the 2-half-adder passes needed (about half the longest carry
// chain, zero or a few for random data).
//
// Follows the document: the algorithm and datapath (CCSA, SM3, M1/M2 with
// >>1 and >>2 taps, Skip_D with q^, A^, skip flip-flops, Zero_D, registers
// N^, B^, D^, A, SS, SC).  This design's own choices: the start/busy/done
// handshake, the state machine, the register widths, clearing SS/SC after
// D^ is taken, one alignment pass after the loop, and forbidding a skip in
// the last iteration (a skip there would divide by 2 once too often).
// Lint notes: rst_n is seen both as the asynchronous reset and in the
// assertions' "disable iff"; bits 4:3 of the M4/M5 outputs are unused because
// Skip_D needs only three bits.
module scs_mm_new
  import mm_pkg::*;
#(
  parameter int unsigned K = 1024  // modulus length in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a,       // multiplier, < 2^(K+1)
  input  logic [K:0]   b,       // multiplicand, < 2^(K+1)
  input  logic [K-1:0] n,       // odd modulus
  output logic         busy,
  output logic         done,
  output logic [K+1:0] result
);
  localparam int unsigned W   = K + 6;             // datapath width
  localparam int unsigned AW  = K + 1;             // A operand width
  localparam int unsigned LAST = K + 5;            // last iteration i = K+4, counted as it = i+1
  localparam int unsigned CW  = $clog2(LAST + 3);  // iteration counter width

  state_e        state_q;
  logic [W-1:0]  nhat_q, bhat_q, dhat_q, ss_q, sc_q;
  logic          qhat_q, ahat_q, skip_q;
  logic [CW-1:0] it_q;                             // it = i + 1

  logic [K+1:0]  nhat_w;
  opsel_e        opsel;
  logic          alpha;
  logic [W-1:0]  m1_out, m2_out, x_n, csa_sum, csa_carry;
  logic [2:0]    ss_low, sc_low;
  logic [4:0]    ss_low5, sc_low5;  // bits 4:3 unused: only the three low bits reach Skip_D
  logic          a1, a2, skip_en, skip_w, q_next, a_next, sc_zero;
  logic          a_load, a_shift;
  logic [CW-1:0] it_next;

  // ------------------------------------------------------------ datapath
  nhat_gen #(.K(K)) u_nhat (.n(n), .n_hat(nhat_w));

  // M1 feeds the SC side (N^ when loading), M2 the SS side (B^ when loading)
  op_mux #(.W(W)) u_m1 (.load_val(nhat_q), .reg_val(sc_q), .sel(opsel), .out(m1_out));
  op_mux #(.W(W)) u_m2 (.load_val(bhat_q), .reg_val(ss_q), .sel(opsel), .out(m2_out));

  sm3 #(.W(W)) u_sm3 (
    .n_hat(nhat_q), .b_hat(bhat_q), .d_hat(dhat_q),
    .q_hat(qhat_q), .a_hat(ahat_q), .x_n(x_n)
  );

  ccsa #(.W(W)) u_ccsa (
    .a(m2_out), .b(m1_out), .x_n(x_n), .alpha(alpha),
    .sum(csa_sum), .carry(csa_carry)
  );

  // M4/M5: low bits of SS[i], SC[i] for the skip detector
  op_mux #(.W(5)) u_m4 (.load_val('0), .reg_val(sc_q[4:0]), .sel(opsel), .out(sc_low5));
  op_mux #(.W(5)) u_m5 (.load_val('0), .reg_val(ss_q[4:0]), .sel(opsel), .out(ss_low5));
  assign sc_low = sc_low5[2:0];
  assign ss_low = ss_low5[2:0];

  a_shifter #(.AW(AW)) u_a (
    .clk(clk), .rst_n(rst_n), .load(a_load), .a_in(a),
    .shift(a_shift), .by_two(skip_w), .a1(a1), .a2(a2)
  );

  skip_d u_skip (
    .ss(ss_low), .sc(sc_low), .q_hat(qhat_q), .n_hat2(nhat_q[2]),
    .a1(a1), .a2(a2), .skip_en(skip_en),
    .skip(skip_w), .q_next(q_next), .a_next(a_next)
  );

  zero_d #(.W(W)) u_zero (.v(sc_q), .zero(sc_zero));

  // ------------------------------------------------------------ control
  assign skip_en = (state_q == ST_LOOP) && (it_q < CW'(LAST));  // i <= K+3
  assign it_next = it_q + (skip_w ? CW'(2) : CW'(1));
  assign a_load  = (state_q == ST_IDLE) && start;
  assign a_shift = (state_q == ST_LOOP);

  always_comb begin
    unique case (state_q)
      ST_PRE:       begin opsel = OPSEL_LOAD; alpha = 1'b1; end
      ST_LOOP:      begin opsel = skip_q ? OPSEL_SH2 : OPSEL_SH1; alpha = 1'b1; end
      ST_ALIGN:     begin opsel = skip_q ? OPSEL_SH2 : OPSEL_SH1; alpha = 1'b0; end
      default:      begin opsel = OPSEL_SH0; alpha = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      nhat_q  <= '0;
      bhat_q  <= '0;
      dhat_q  <= '0;
      ss_q    <= '0;
      sc_q    <= '0;
      qhat_q  <= 1'b0;
      ahat_q  <= 1'b0;
      skip_q  <= 1'b0;
      it_q    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start) begin
          nhat_q  <= W'(nhat_w);
          bhat_q  <= W'(b) << 3;
          qhat_q  <= 1'b0;
          ahat_q  <= 1'b0;
          skip_q  <= 1'b0;
          state_q <= ST_PRE;
        end
        ST_PRE: begin
          ss_q    <= csa_sum;
          sc_q    <= csa_carry;
          state_q <= ST_PRE_PROP;
        end
        ST_PRE_PROP: begin
          if (sc_zero) begin
            dhat_q  <= ss_q;
            ss_q    <= '0;     // SS[-1] = SC[-1] = 0
            sc_q    <= '0;
            it_q    <= '0;
            state_q <= ST_LOOP;
          end else begin
            ss_q <= csa_sum;
            sc_q <= csa_carry;
          end
        end
        ST_LOOP: begin
          ss_q   <= csa_sum;
          sc_q   <= csa_carry;
          skip_q <= skip_w;
          it_q   <= it_next;
          if (it_next > CW'(LAST)) begin
            qhat_q  <= 1'b0;   // q^ = 0, A^ = 0 after the loop
            ahat_q  <= 1'b0;
            state_q <= ST_ALIGN;
          end else begin
            qhat_q <= q_next;
            ahat_q <= a_next;
          end
        end
        ST_ALIGN: begin
          ss_q    <= csa_sum;
          sc_q    <= csa_carry;
          skip_q  <= 1'b0;
          state_q <= ST_POST_PROP;
        end
        ST_POST_PROP: begin
          if (sc_zero) begin
            done    <= 1'b1;
            state_q <= ST_IDLE;
          end else begin
            ss_q <= csa_sum;
            sc_q <= csa_carry;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy   = (state_q != ST_IDLE);
  assign result = ss_q[K+1:0];

  // the result must fit its K+2 bits when it is reported
  a_result_fits : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (ss_q[W-1:K+2] == '0));
  // start is only honoured while idle
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_IDLE && start) |=> busy);

endmodule
