// mm_pkg: types shared by the SCS-MM-New Montgomery multiplier.
//
// opsel_e encodes the setting of the operand multiplexers M1/M2 (and of
// M4/M5 in front of the skip detector): take the loaded operand (N^ or B^,
// used once to start D^ = B^ + N^), or take the SS/SC register shifted right
// by 0 (carry propagation), 1 (normal iteration) or 2 (after a skip).
// The encoding is this design's own choice.
package mm_pkg;

  typedef enum logic [1:0] {
    OPSEL_LOAD = 2'd0,
    OPSEL_SH0  = 2'd1,
    OPSEL_SH1  = 2'd2,
    OPSEL_SH2  = 2'd3
  } opsel_e;

  // Controller states of the multiplier (scs_mm_new).
  typedef enum logic [2:0] {
    ST_IDLE      = 3'd0,  // waiting for start
    ST_PRE       = 3'd1,  // (SS,SC) = 1F_CSA(B^, N^, 0)
    ST_PRE_PROP  = 3'd2,  // while SC != 0: 2H_CSA; then D^ = SS
    ST_LOOP      = 3'd3,  // Montgomery iterations with skipping
    ST_ALIGN     = 3'd4,  // first 2H_CSA on the shifted loop result
    ST_POST_PROP = 3'd5   // while SC != 0: 2H_CSA; then done
  } state_e;

endpackage
