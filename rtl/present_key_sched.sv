// present_key_sched: 128-bit key shift register of the PRESENT-128 core.
//
// The key sits in a 128-bit register that moves 16 bits per cycle, and the
// round key is streamed out of RKgen 16 bits at a time, most significant
// slice first, during the four compute cycles of a round. The register only
// shifts in those cycles, so it moves 64 bits per round while the PRESENT
// key rotates by 61. Two 3-bit registers take up the difference on the read
// side:
//  * round 1 reads the 16 MSBs as they are; A keeps their 3 LSBs, so after
//    the round A holds the 3 bits "lost" to the 64-bit shift;
//  * round 2 reads A followed by the 13 MSBs, and A again keeps the 3 LSBs;
//    at the end of round 2, B keeps the last 3 bits read;
//  * from round 3 on, each slice is B, A and the 10 MSBs, and B||A keep the
//    6 LSBs of the 16 MSBs.
// Every slice passes through RKgen and is written back at the bottom; the
// last slice of a round is written back with the 3-bit offset (see
// present_rkgen), so no further registers are needed. `op` LOAD shifts key
// words in from `din` instead; the 16 MSBs still leave through RKgen and A
// and B still update, which lets a new key load while the last round key is
// used. HOLD keeps everything. `slice` is the
// cycle within the four compute cycles and `rnd` the round (0 = round 32,
// the final key). Operation codes are in present_pkg.
// The 16-bit shifting register, the 16-MSB tap into RKgen, registers A and B
// and the read order of rounds 1 and 2 follow the document; the 10-bit read
// after B and A from round 3 on and the write-back taps are this design's
// derivation, checked against the PRESENT-128 key schedule. One cycle per
// operation; `rk` is combinational from the register, A, B, slice and rnd.
module present_key_sched
  import present_pkg::*;
(
  input  logic         clk,
  input  present_kop_t op,
  input  logic [15:0]  din,
  input  logic [1:0]   slice,
  input  logic [4:0]   rnd,
  output logic [15:0]  rk
);
  logic [127:0] key;
  logic [15:0]  top, chunk, wb;
  logic [2:0]   a, b;

  assign top = key[127:112];

  always_comb begin
    unique case (rnd)
      5'd1:    chunk = top;
      5'd2:    chunk = {a, top[15:3]};
      default: chunk = {b, a, top[15:6]};
    endcase
  end

  present_rkgen u_rkgen (.chunk_in(chunk), .slice, .rnd, .rk, .wb);

  always_ff @(posedge clk)
    if (op != KOP_HOLD) begin
      key <= {key[111:0], (op == KOP_LOAD) ? din : wb};
      a   <= top[2:0];
      if (rnd == 5'd2) begin
        if (slice == 2'd3) b <= chunk[2:0];
      end else if (rnd != 5'd1) begin
        b <= top[5:3];
      end
    end
endmodule
