// tb_scs_mm_new: end-to-end test of the SCS-MM-New multiplier at K = 48.
//
// Runs directed and random multiplications (both modulus classes, N mod 4 =
// 1 and 3) and checks for each:
//   * the result equals the integer Montgomery recurrence (mm_model::mont),
//   * result * 2^(K+2) = A * B (mod N),
//   * D^ equals B^ + N^,
//   * the result and the cycle count match the word-level algorithm model,
//     which counts the carry-propagation passes and the skipped iterations.
// It also counts how often each mechanism occurred inside the multiplier and
// fails if one never did: skipped iterations, a skip forbidden in the last
// iteration, a skip into the last iteration (alignment by two), each of the
// four x choices 0/N^/B^/D^, carry propagation before and after the loop,
// and both N^ formulas.
module tb_scs_mm_new;
  import mm_ref_pkg::*;
  import mm_pkg::*;
  localparam int unsigned K = 48;
  localparam int RUNS = 400;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K:0]   a, b;
  logic [K-1:0] n;
  logic         busy, done;
  logic [K+1:0] result;
  int checks = 0, failures = 0, cycles = 0;

  scs_mm_new #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // ---- mechanism counters, observed inside the multiplier
  int ev_skip = 0, ev_suppress = 0, ev_align2 = 0, ev_pre_prop = 0, ev_post_prop = 0;
  int ev_x[4] = '{default: 0};
  int ev_n1 = 0, ev_n3 = 0, ev_long_chain = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.state_q == ST_LOOP) begin
      ev_x[{dut.ahat_q, dut.qhat_q}]++;
      if (dut.skip_w) ev_skip++;
      if (!dut.skip_en && !(dut.a1 | (dut.ss_low[1] ^ dut.sc_low[1]) |
                            (dut.ss_low[0] & dut.sc_low[0]))) ev_suppress++;
    end
    if (dut.state_q == ST_ALIGN && dut.skip_q) ev_align2++;
    if (dut.state_q == ST_PRE_PROP && !dut.sc_zero) ev_pre_prop++;
    if (dut.state_q == ST_POST_PROP && !dut.sc_zero) ev_post_prop++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%h b=%h n=%h", what, a, b, n);
    end
  endtask

  task automatic multiply(input logic [K:0] ia, input logic [K:0] ib, input logic [K-1:0] in_);
    mm_model #(K) m = new;
    int lat;
    a = ia; b = ib; n = in_;
    m.run(a, b, n);
    if (n[1]) ev_n3++; else ev_n1++;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0; n = '0;   // operands are captured at start
    check(busy, "busy after start");
    do begin @(posedge clk); lat++; #1; end while (!done && lat < 10 * int'(K) + 100);
    a = ia; b = ib; n = in_;
    check(done, "done");
    check(dut.dhat_q == m.d_hat, "D^ = B^ + N^");
    check(result == mm_model#(K)::mont(a, b, n), "result vs Montgomery recurrence");
    check(mm_model#(K)::congruent(result, a, b, n), "result congruent to A*B*2^-(K+2)");
    check((K+6)'(result) == m.result, "result vs algorithm model");
    // two half adders per cycle: half the passes of a single stage
    check(m.pre_passes == (m.pre_1h + 1) / 2, "D^ propagation takes half the passes");
    check(1 + m.post_passes == ((m.post_1h + 1) / 2 > 0 ? (m.post_1h + 1) / 2 : 1),
          "result conversion takes half the passes");
    if (m.pre_1h > int'(K) - 8) ev_long_chain++;
    check(lat == m.latency(), $sformatf("latency %0d, model %0d", lat, m.latency()));
    check(!busy, "idle with done");
    @(posedge clk); #1;
    check(!busy && !done, "done is a single-cycle pulse");
  endtask

  initial begin
    logic [K:0] amax;
    amax = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed corners
    multiply('0, '0, mm_model#(K)::rand_mod(1));
    multiply(amax, amax, '1);
    multiply(amax, amax, mm_model#(K)::rand_mod(0));
    multiply((K+1)'(1), (K+1)'(1), {1'b1, {(K-2){1'b0}}, 1'b1});
    multiply(amax, (K+1)'(1), mm_model#(K)::rand_mod(1));
    // B^ + N^ = (2^K - 8) + 8: a carry chain over nearly all K bits
    multiply(mm_model#(K)::rand_op(), ((K+1)'(1) << (K - 3)) - (K+1)'(1), K'(7));
    // random
    for (int r = 0; r < RUNS; r++) begin
      logic [K-1:0] nn;
      logic [K:0] aa, bb;
      nn = mm_model#(K)::rand_mod(r % 2 == 0);
      aa = mm_model#(K)::rand_op();
      bb = mm_model#(K)::rand_op();
      if (r % 5 == 1) aa = aa >> ($urandom % K);   // sparse A: more skips
      multiply(aa, bb, nn);
    end
    $display("events: skip=%0d suppressed=%0d align2=%0d x0=%0d xN=%0d xB=%0d xD=%0d pre_prop=%0d post_prop=%0d n1=%0d n3=%0d long_chain=%0d",
             ev_skip, ev_suppress, ev_align2, ev_x[0], ev_x[1], ev_x[2], ev_x[3],
             ev_pre_prop, ev_post_prop, ev_n1, ev_n3, ev_long_chain);
    check(ev_skip > 0, "a skip happened");
    check(ev_suppress > 0, "a skip in the last iteration was forbidden");
    check(ev_align2 > 0, "alignment by two after a skip into the last iteration");
    foreach (ev_x[j]) check(ev_x[j] > 0, $sformatf("x choice %0d used", j));
    check(ev_pre_prop > 0, "carry propagation for D^");
    check(ev_post_prop > 0, "carry propagation for the result");
    check(ev_n1 > 0 && ev_n3 > 0, "both N^ formulas");
    check(ev_long_chain > 0, "a carry chain over the whole word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 200 * (RUNS + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
