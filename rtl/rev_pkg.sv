// rev_pkg: types and sizes shared by the reversible signed-magnitude
// adder/subtractor and its testbenches.
//
// Operands are four-bit signed-magnitude numbers: one sign bit and a three-bit
// magnitude, range -7..+7. The result has five bits: the sign, then a
// four-bit magnitude whose top bit E is the carry of a magnitude addition, so
// sums such as 7 + 7 = 14 are returned exactly instead of overflowing. The
// garbage counts are those of the two gate-level designs (21 garbage lines
// each) and of the stand-alone NLG zero comparator (7).
package rev_pkg;

  localparam int unsigned MAG_W   = 3;   // magnitude bits of an operand
  localparam int unsigned SM_GARB = 21;  // garbage outputs of either adder/subtractor
  localparam int unsigned ZC_GARB = 7;   // garbage outputs of the NLG zero comparator

  // One operation: operation select and the two signed-magnitude operands.
  typedef struct packed {
    logic             c_fs;  // 0: A + B, 1: A - B
    logic             a_s;   // sign of A (1 = negative)
    logic [MAG_W-1:0] a;     // magnitude of A
    logic             b_s;   // sign of B
    logic [MAG_W-1:0] b;     // magnitude of B
  } sm_op_t;

  // Five-bit signed-magnitude result S_s, E, S2..S0.
  typedef struct packed {
    logic             s_s;   // sign of the result
    logic             e;     // magnitude bit 3
    logic [MAG_W-1:0] s;     // magnitude bits 2..0
  } sm_res_t;

endpackage
