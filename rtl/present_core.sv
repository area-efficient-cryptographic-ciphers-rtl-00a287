// present_core: 16-bit PRESENT-128 block cipher encryption core.
//
// PRESENT is a 31-round substitution-permutation network on 64-bit blocks;
// this core uses its 128-bit key version. The datapath is 16 bits wide:
// each round takes 8 cycles, four that pass 16 state bits per cycle through
// the round-key XOR and four S-boxes into the permutation register SR2, and
// four that copy SR2 back into the state register SR1. The key register
// shifts out the round key 16 bits per cycle in step with the state; the
// key update is done on that stream by RKgen and written back as it goes.
//
// Interface and timing. A one-cycle `start` in idle begins a block. From the
// next cycle `din_ready` is high for 12 consecutive cycles and one 16-bit word
// is sampled per cycle: the key, K[127:112] first and K[15:0] eighth, then
// the plaintext, P[63:48] first. The plaintext words enter the first round
// directly through the Data-in multiplexer. After 31 rounds, `dout_valid` is
// high for 4 cycles carrying the ciphertext, C[63:48] first, each word XORed
// with the last round key on its way out; `done` pulses in the cycle after.
// Key load plus rounds take 8 + 31*8 = 256 cycles and the output 4 more,
// 260 cycles from the first key word to the last ciphertext word.
//
// Back-to-back blocks. `start_ready` is high in idle and also in the last
// cycle of round 31. A `start` in that last cycle chains the next block: during
// the 4 output cycles the key register takes the first 4 key words of the
// next block at its bottom while the last round key still leaves at its top
// (din_ready is high), then 4 more key words follow and round 1 of the next
// block begins. Blocks then start every 256 cycles, the cycle count per block
// the document reports for this architecture.
//
// The 16-bit width, SR1/SR2 permutation scheme, four state S-boxes, 8-cycle
// round and the 16-bit key shift register with RKgen and the 3-bit
// registers A and B follow the document. The word order and the
// load/output handshake are this design's choices.
module present_core
  import present_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] din,
  output logic        din_ready,
  output logic [15:0] dout,
  output logic        dout_valid,
  output logic        busy,
  output logic        done,
  output logic        start_ready
);
  present_phase_t phase;
  logic [2:0]     cyc;        // cycle within key load, round or output
  logic [4:0]     round_ctr;  // 1..31, 0 during output (round 32)
  present_op_t    sop;
  present_kop_t   kop;
  logic [15:0]    rk;
  logic           first_round, compute, last_cycle, chain;

  assign first_round = (round_ctr == 5'd1);
  assign compute     = (phase == PPH_ROUND) && !cyc[2];
  assign last_cycle  = (phase == PPH_ROUND) && (cyc == 3'd7) &&
                       (round_ctr == 5'(PRESENT_ROUNDS));
  assign start_ready = (phase == PPH_IDLE) || last_cycle;

  always_ff @(posedge clk)
    if (!rst_n) begin
      phase     <= PPH_IDLE;
      cyc       <= '0;
      round_ctr <= 5'd1;
      done      <= 1'b0;
      chain     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PPH_IDLE:
          if (start) begin
            phase     <= PPH_KEY;
            cyc       <= '0;
            round_ctr <= 5'd1;
          end
        PPH_KEY: begin
          cyc <= cyc + 3'd1;
          if (cyc == 3'd7) phase <= PPH_ROUND;
        end
        PPH_ROUND: begin
          cyc <= cyc + 3'd1;
          if (cyc == 3'd7) begin
            // after round 31 the counter wraps to 0, which stands for the
            // final key (round 32) used on output
            round_ctr <= round_ctr + 5'd1;
            if (last_cycle) begin
              phase <= PPH_OUT;
              chain <= start;
            end
          end
        end
        PPH_OUT: begin
          cyc <= cyc + 3'd1;
          if (cyc == 3'd3) begin
            // a chained block continues with its remaining 4 key words
            phase     <= chain ? PPH_KEY : PPH_IDLE;
            round_ctr <= 5'd1;
            chain     <= 1'b0;
            done      <= 1'b1;
          end
        end
        default: phase <= PPH_IDLE;
      endcase
    end

  always_comb begin
    sop = SOP_HOLD;
    kop = KOP_HOLD;
    unique case (phase)
      PPH_KEY:   kop = KOP_LOAD;
      PPH_ROUND:
        if (compute) begin
          sop = SOP_COMPUTE;
          kop = KOP_SHIFT;
        end else begin
          sop = SOP_COPY;
          kop = KOP_HOLD;
        end
      PPH_OUT: begin
        sop = SOP_OUT;
        kop = chain ? KOP_LOAD : KOP_SHIFT;  // both deliver the top slice
      end
      default: ;
    endcase
  end

  present_key_sched u_key (
    .clk, .op(kop), .din, .slice(cyc[1:0]), .rnd(round_ctr), .rk
  );

  present_state_path u_state (
    .clk, .op(sop), .sel_din(first_round), .din, .rk, .dout
  );

  assign din_ready  = (phase == PPH_KEY) || (compute && first_round) ||
                      ((phase == PPH_OUT) && chain);
  assign dout_valid = (phase == PPH_OUT);
  assign busy       = (phase != PPH_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) start |-> start_ready)
    else $error("present_core: start while busy");
endmodule
