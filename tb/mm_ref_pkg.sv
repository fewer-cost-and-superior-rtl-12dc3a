// mm_ref_pkg: reference models for the SCS-MM-New multiplier testbenches.
//
// mm_model#(K) re-computes the multiplier's algorithm at word level, without
// any of its gate-level tricks: the carry-save additions are written as
// vector xor/majority, q and skip are taken from their definitions (the LSB
// of SS+SC, and "A_{i+1} = 0, q_{i+1} = 0, SS[i+1]_0 = 0"), not from the
// precomputation equations.  It yields the result, the number of clock cycles
// each phase needs and event counts.  mont() is the plain integer radix-2
// Montgomery recurrence T = (T + A_j*8B + q*(N^-1)) / 2 over K+5 bits of A,
// a model independent of carry-save form altogether.
package mm_ref_pkg;

  class mm_model #(int unsigned K = 32);
    localparam int unsigned W = K + 6;
    typedef logic [W-1:0] vec_t;

    vec_t d_hat, result;
    int   pre_passes, loop_cycles, post_passes, skips, suppressed, skip_at_end;
    int   pre_1h, post_1h;   // passes a single half-adder stage would need
    int   xsel[4];

    static function logic [K+1:0] nhat(logic [K-1:0] n);
      logic [K+1:0] e = {2'b00, n};
      return n[1] ? e + 1 : 3 * e + 1;
    endfunction

    // number of single half-adder passes until the carry vector is zero
    static function int passes1h(vec_t s, vec_t c);
      int p = 0;
      while (c != 0) begin
        vec_t t = s ^ c;
        c = (s & c) << 1;
        s = t;
        p++;
      end
      return p;
    endfunction

    // two serial half-adder stages on a carry-save pair
    static function void pass2h(ref vec_t s, ref vec_t c);
      vec_t t  = s ^ c;
      vec_t gs = (s & c) << 1;
      s = t ^ gs;
      c = (t & gs) << 1;
    endfunction

    function void run(logic [K:0] a, logic [K:0] b, logic [K-1:0] n);
      vec_t nh = W'(nhat(n));
      vec_t bh = W'(b) << 3;
      vec_t s, c, x, sum, car;
      logic [K+8:0] aa = (K+9)'(a);
      logic qh, ah, q1, sk;
      int i;
      pre_passes = 0; loop_cycles = 0; post_passes = 0;
      skips = 0; suppressed = 0; skip_at_end = 0;
      foreach (xsel[j]) xsel[j] = 0;
      // D^ = B^ + N^
      s = bh ^ nh; c = (bh & nh) << 1;
      pre_1h = passes1h(s, c);
      while (c != 0) begin pass2h(s, c); pre_passes++; end
      d_hat = s;
      // Montgomery loop, SS/SC held after the shift
      s = '0; c = '0; qh = 1'b0; ah = 1'b0; i = -1; sk = 1'b0;
      while (i <= int'(K) + 4) begin
        case ({ah, qh})
          2'b00: x = '0;
          2'b01: x = nh;
          2'b10: x = bh;
          default: x = d_hat;
        endcase
        xsel[{ah, qh}]++;
        sum = s ^ c ^ x;
        car = ((s & c) | (s & x) | (c & x)) << 1;
        s = sum >> 1; c = car >> 1;
        q1 = s[0] ^ c[0];
        sk = !(aa[i+1] | q1 | s[0]);
        if (sk && i > int'(K) + 3) begin sk = 1'b0; suppressed++; end
        loop_cycles++;
        if (sk) begin
          s = s >> 1; c = c >> 1;
          qh = s[0] ^ c[0]; ah = aa[i+2];
          skips++;
          if (i == int'(K) + 3) skip_at_end++;
          i += 2;
        end else begin
          qh = q1; ah = aa[i+1];
          i += 1;
        end
      end
      // carry-save to binary: one alignment pass, then until SC = 0
      post_1h = passes1h(s, c);
      pass2h(s, c);
      while (c != 0) begin pass2h(s, c); post_passes++; end
      result = s;
    endfunction

    // clock cycles from the start edge to the edge that raises done
    function int latency();
      return pre_passes + loop_cycles + post_passes + 4;
    endfunction

    // integer Montgomery recurrence with the reduction modulus N^ - 1
    static function logic [K+1:0] mont(logic [K:0] a, logic [K:0] b, logic [K-1:0] n);
      logic [K+8:0] t = '0;
      logic [K+8:0] ne = (K+9)'(nhat(n)) - 1;
      logic [K+8:0] be = (K+9)'(b) << 3;
      for (int j = 0; j <= int'(K) + 4; j++) begin
        logic q = t[0];
        t = t + ((j <= int'(K) && a[j]) ? be : '0) + (q ? ne : '0);
        t = t >> 1;
      end
      return t[K+1:0];
    endfunction

    // (r * 2^(K+2)) mod n == (a * b) mod n ?
    static function bit congruent(logic [K+1:0] r, logic [K:0] a, logic [K:0] b,
                                  logic [K-1:0] n);
      logic [3*K+8:0] lhs = (3*K+9)'(r) << (K + 2);
      logic [3*K+8:0] rhs = (3*K+9)'(a) * (3*K+9)'(b);
      logic [3*K+8:0] nn  = (3*K+9)'(n);
      return (lhs % nn) == (rhs % nn);
    endfunction

    static function logic [K:0] rand_op();
      logic [K+31:0] r;
      for (int j = 0; j < int'(K) + 1; j += 32) r[j +: 32] = $urandom;
      return r[K:0];
    endfunction

    static function logic [K-1:0] rand_mod(bit three);
      logic [K+31:0] r;
      for (int j = 0; j < int'(K); j += 32) r[j +: 32] = $urandom;
      r[K-1] = 1'b1;
      r[1:0] = three ? 2'b11 : 2'b01;
      return r[K-1:0];
    endfunction
  endclass

endpackage
