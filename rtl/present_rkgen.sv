// present_rkgen: round-key generation function of the PRESENT-128 core.
//
// Works on one 16-bit slice of the key stream per cycle; `slice` (0..3) says
// which quarter of the round key it is and `rnd` which round (1..31, with 0
// standing for the final key used on output, round 32). It returns the
// round-key slice `rk` and the slice `wb` written back into the key shift
// register.
//
// The PRESENT-128 update (rotate left 61, S-box on the two top nibbles, XOR
// of the round counter into bits 66..62) is spread over the stream:
//  * slice 0 of rounds 2 and later: the 5 leading bits are XORed with the
//    counter of round rnd-2 (they are the bits that update rnd-2 targeted
//    and that have not passed through RKgen since), then the two top
//    nibbles go through the two S-boxes;
//  * slice 3 write-back: bits 8..6 (key bits 72..70 of this round) are
//    XORed with bits 4..2 of counter rnd+1, which lands them at bits 66..64
//    of the key two rounds later; and the 6 bits after them are filled from
//    taps 8..3 of the same slice, so the register absorbs the 3-bit
//    difference between the 64-bit shift per round and the 61-bit rotation.
// Two S-boxes, a 5-bit XOR with the round counter and multiplexers, as in
// the document; which bits they act on at which slice is this design's
// derivation. Combinational.
module present_rkgen (
  input  logic [15:0] chunk_in,
  input  logic [1:0]  slice,
  input  logic [4:0]  rnd,
  output logic [15:0] rk,
  output logic [15:0] wb
);
  logic        front;
  logic [4:0]  c_front;
  logic [2:0]  c_next_hi;
  logic [15:0] x;
  logic [3:0]  s_hi, s_lo;

  assign front   = (slice == 2'd0) && (rnd != 5'd1);
  assign c_front = rnd - 5'd2;   // round 32 is encoded as 0: gives 30
  assign c_next_hi = 3'((rnd + 5'd1) >> 2);  // counter bits 4..2 only

  assign x = front ? {chunk_in[15:11] ^ c_front, chunk_in[10:0]} : chunk_in;

  present_sbox u_s0 (.x(x[15:12]), .y(s_hi));
  present_sbox u_s1 (.x(x[11:8]),  .y(s_lo));

  assign rk = front ? {s_hi, s_lo, x[7:0]} : x;
  assign wb = (slice == 2'd3) ? {rk[15:9], rk[8:6] ^ c_next_hi, rk[8:3]} : rk;
endmodule
