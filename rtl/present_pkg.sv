// present_pkg: operation codes shared by the 16-bit PRESENT-128 core.
//
// The state datapath and the key register are both shift registers that
// move 16 bits per cycle. The controller drives them with the small operation
// codes below.
package present_pkg;

  typedef enum logic [1:0] {
    SOP_HOLD    = 2'd0,  // keep SR1 and SR2
    SOP_COMPUTE = 2'd1,  // one quarter of a round: XOR, 4 S-boxes, 4-bit SR2 shift
    SOP_COPY    = 2'd2,  // move 16 bits of SR2 into SR1
    SOP_OUT     = 2'd3   // rotate SR1 by 16 while its MSBs leave through the key XOR
  } present_op_t;

  typedef enum logic [1:0] {
    KOP_HOLD  = 2'd0,
    KOP_LOAD  = 2'd1,  // shift 16 key bits in from din
    KOP_SHIFT = 2'd2   // 16-bit left shift, RKgen output written back
  } present_kop_t;

  typedef enum logic [1:0] {
    PPH_IDLE  = 2'd0,
    PPH_KEY   = 2'd1,
    PPH_ROUND = 2'd2,
    PPH_OUT   = 2'd3
  } present_phase_t;

  localparam int unsigned PRESENT_ROUNDS = 31;
endpackage
