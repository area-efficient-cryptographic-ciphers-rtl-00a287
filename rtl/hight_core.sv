// hight_core: 8-bit HIGHT-128 block cipher encryption core.
//
// HIGHT encrypts a 64-bit block under a 128-bit key in 32 rounds of a
// generalized Feistel network built from byte XOR, byte addition and the
// rotations F0/F1. This core processes one byte per clock: the state is kept
// in an 8x8 dual-port RAM, the key in a 16x8 single-port RAM, and the byte
// rotation of every round is done by moving addresses, not data.
//
// Interface and timing. A one-cycle `start` in idle begins a block. From the
// next cycle on, `din_ready` is high for 24 consecutive cycles and the core
// samples one byte per cycle: the key bytes K0..K15, then the plaintext bytes
// P0..P7 (Pj is bits 8j+7..8j of the plaintext). The initial transformation
// is applied to each plaintext byte as it is written. 32 rounds of 4 cycles
// follow; the four subkeys of a round are formed on the fly from the key RAM
// and the delta LFSR. Then `dout_valid` is high for 8 cycles carrying
// C0..C7, each byte passing through the final transformation on its way out,
// and `done` pulses in the cycle after C7. A block therefore takes
// 16 + 8 + 128 + 8 = 160 cycles from the first key byte to the last
// ciphertext byte, matching the cycle count the document reports. The key is
// reloaded for every block.
//
// The byte-serial organisation, the RAMs, the address generator, the key
// counters and the 4-cycle round follow the document. The byte order on
// din/dout, the key load phase and the handshake are this design's choices.
module hight_core
  import hight_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] din,
  output logic       din_ready,
  output logic [7:0] dout,
  output logic       dout_valid,
  output logic       busy,
  output logic       done
);
  localparam int unsigned ROUNDS = 32;

  hight_phase_t phase;
  logic [4:0]   cnt;       // 5-bit control counter: key byte index, then round number
  logic [2:0]   c3;
  logic [1:0]   k;         // cycle within a round
  logic         last_key, last_byte, last_round_cycle;
  logic         c3_clr;

  logic [2:0]   addr_a, addr_b;
  logic [7:0]   rdata_a, rdata_b, y, x_a, key_byte;
  logic [3:0]   key_addr, kaddr_gen;
  logic [6:0]   delta;
  hight_op_t    op;
  logic         ram_we, key_use, key_hold, key_msb;

  assign k                = c3[1:0];
  assign last_key         = (phase == PH_KEY) && (cnt[3:0] == 4'd15);
  assign last_byte        = (c3 == 3'd7);
  assign last_round_cycle = (phase == PH_ROUND) && (k == 2'd3) && (cnt == 5'(ROUNDS - 1));
  assign c3_clr           = (phase == PH_IDLE) || last_key || last_round_cycle ||
                            ((phase == PH_LOAD) && last_byte);

  // ---------------- controller ----------------
  always_ff @(posedge clk)
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE:
          if (start) begin
            phase <= PH_KEY;
            cnt   <= '0;
          end
        PH_KEY: begin
          cnt <= cnt + 5'd1;
          if (last_key) phase <= PH_LOAD;
        end
        PH_LOAD:
          if (last_byte) begin
            phase <= PH_ROUND;
            cnt   <= '0;
          end
        PH_ROUND:
          if (k == 2'd3) begin
            cnt <= cnt + 5'd1;
            if (last_round_cycle) phase <= PH_FINAL;
          end
        PH_FINAL:
          if (last_byte) begin
            phase <= PH_IDLE;
            done  <= 1'b1;
          end
        default: phase <= PH_IDLE;
      endcase
    end

  // operation of the byte datapath
  always_comb begin
    op = OP_PASS;
    unique case (phase)
      PH_LOAD, PH_FINAL:
        if (!c3[0]) op = c3[1] ? OP_XOR_WK : OP_ADD_WK;
      PH_ROUND:
        op = k[0] ? OP_RND_F0 : OP_RND_F1;
      default: op = OP_PASS;
    endcase
  end

  assign ram_we   = (phase == PH_LOAD) || (phase == PH_ROUND);
  assign key_use  = ((phase inside {PH_LOAD, PH_FINAL}) && !c3[0]) || (phase == PH_ROUND);
  assign key_hold = (phase == PH_ROUND) && cnt[0] && (k == 2'd3);
  assign key_msb  = (phase == PH_LOAD) ? 1'b1 : (phase == PH_ROUND) ? cnt[1] : 1'b0;
  assign key_addr = (phase == PH_KEY) ? cnt[3:0] : kaddr_gen;

  // M1: plaintext byte or port A
  assign x_a = (phase == PH_LOAD) ? din : rdata_a;

  // ---------------- datapath ----------------
  hight_addr_gen u_addr (
    .clk, .rst_n, .phase, .c3_clr, .c3, .addr_a, .addr_b
  );

  hight_data_ram u_data (
    .clk, .we(ram_we), .addr_a, .wdata(y), .rdata_a, .addr_b, .rdata_b
  );

  hight_key_addr u_kaddr (
    .clk, .init(phase == PH_IDLE), .use_key(key_use), .hold(key_hold),
    .msb(key_msb), .addr(kaddr_gen)
  );

  hight_key_ram u_key (
    .clk, .we(phase == PH_KEY), .addr(key_addr), .wdata(din), .rdata(key_byte)
  );

  hight_delta_lfsr u_lfsr (
    .clk, .init(phase == PH_IDLE), .step(phase == PH_ROUND), .delta
  );

  hight_round_fn u_fn (
    .op, .x_a, .x_b(rdata_b), .key_byte, .delta, .y
  );

  assign din_ready  = (phase == PH_KEY) || (phase == PH_LOAD);
  assign dout       = y;
  assign dout_valid = (phase == PH_FINAL);
  assign busy       = (phase != PH_IDLE);

  // A new block may only be started from idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> phase == PH_IDLE)
    else $error("hight_core: start while busy");
endmodule
