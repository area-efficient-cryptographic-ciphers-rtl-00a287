// hight_pkg: types and helper functions shared by the 8-bit HIGHT-128 core.
//
// HIGHT works on bytes only: its round function uses XOR, addition modulo 2^8
// and the two byte mixing functions F0 and F1, each an XOR of three left
// rotations of the byte. The controller steps through the phases below; the
// byte datapath is told what to do with an operation code.
package hight_pkg;

  // Phases of one block: key load (16 cycles), plaintext load with the
  // initial transformation (8), 32 rounds (4 cycles each), ciphertext output
  // with the final transformation (8).
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_KEY   = 3'd1,
    PH_LOAD  = 3'd2,
    PH_ROUND = 3'd3,
    PH_FINAL = 3'd4
  } hight_phase_t;

  // Operation of the byte datapath for the current cycle.
  typedef enum logic [2:0] {
    OP_PASS   = 3'd0,  // y = x_a (odd bytes of the whitening steps)
    OP_ADD_WK = 3'd1,  // y = x_a + key byte (whitening by addition)
    OP_XOR_WK = 3'd2,  // y = x_a ^ key byte (whitening by XOR)
    OP_RND_F1 = 3'd3,  // y = x_a + (F1(x_b) ^ SK)
    OP_RND_F0 = 3'd4   // y = x_a ^ (F0(x_b) + SK)
  } hight_op_t;

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int unsigned n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] hight_f0(input logic [7:0] x);
    return rotl8(x, 1) ^ rotl8(x, 2) ^ rotl8(x, 7);
  endfunction

  function automatic logic [7:0] hight_f1(input logic [7:0] x);
    return rotl8(x, 3) ^ rotl8(x, 4) ^ rotl8(x, 6);
  endfunction

  localparam logic [6:0] DELTA0 = 7'h5A;  // first subkey constant
endpackage
