// dll_mm_pkg -- constants and types shared by the Montgomery multiplier and
// its testbenches.
//
// MM_K is the operand width of the design, 32 bits, the width of the
// dual-logic-level multiplier the design is built around. mm_state_e names
// the steps of one Montgomery multiplication; each step takes one clock
// cycle (see dll_montgomery).
package dll_mm_pkg;
  parameter int unsigned MM_K = 32;

  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for start
    ST_MUL_AB,   // T = A * B
    ST_MUL_Q,    // Q = (T mod R) * N' mod R
    ST_MUL_QN,   // U = (T + Q * N) / R
    ST_CORRECT   // result = U >= N ? U - N : U
  } mm_state_e;
endpackage
