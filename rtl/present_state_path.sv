// present_state_path: state datapath of the 16-bit PRESENT-128 core.
//
// The 64-bit state is held in SR1, seen as sixteen 4-bit blocks 15..0, which
// rotates left by 16 bits per cycle; its 16 MSBs (blocks 15..12) are tapped
// out. A multiplexer chooses these bits or the 16-bit `din` (plaintext in
// the first round); the result is XORed with the round-key slice `rk` and
// fed to four S-boxes. The bit permutation is done by a second 64-bit
// register SR2: the four S-box outputs of one cycle, coming from state
// blocks 4q+3..4q, are exactly the bits of result blocks 12+q, 8+q, 4+q
// and q (bit m of the S-box output for block 4q+b becomes bit b of result
// block 4m+q), and they are written into blocks 12, 8, 4 and 0 while SR2
// shifts left by 4 bits. After four compute cycles (q = 3, 2, 1, 0) SR2
// holds the permuted state; four copy cycles then move it into SR1 16 bits
// at a time. The output operation rotates SR1 and presents its MSBs XORed
// with `rk` on `dout`: the final key addition. Registers only change under
// `op` (present_pkg::present_op_t). The structure follows the document's
// figure of SR1, SR2 and the four S-boxes.
module present_state_path
  import present_pkg::*;
(
  input  logic        clk,
  input  present_op_t op,
  input  logic        sel_din,
  input  logic [15:0] din,
  input  logic [15:0] rk,
  output logic [15:0] dout
);
  logic [63:0] sr1, sr2, sr2_next;
  logic [15:0] x, s;
  logic [3:0]  blk [4];   // new values of SR2 blocks 12, 8, 4, 0 (index m = 3..0)

  assign x    = (sel_din ? din : sr1[63:48]) ^ rk;
  assign dout = sr1[63:48] ^ rk;

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    present_sbox u_s (.x(x[4*i +: 4]), .y(s[4*i +: 4]));
  end

  // new block for SR2 position 4m: bit b is bit m of S-box b
  always_comb
    for (int m = 0; m < 4; m++)
      for (int b = 0; b < 4; b++)
        blk[m][b] = s[4*b + m];

  always_comb begin
    sr2_next = {sr2[59:0], 4'h0};
    for (int m = 0; m < 4; m++)
      sr2_next[16*m +: 4] = blk[m];
  end

  always_ff @(posedge clk)
    unique case (op)
      SOP_COMPUTE: begin
        sr1 <= {sr1[47:0], sr1[63:48]};
        sr2 <= sr2_next;
      end
      SOP_COPY: begin
        sr1 <= {sr1[47:0], sr2[63:48]};
        sr2 <= {sr2[47:0], sr2[63:48]};
      end
      SOP_OUT:  sr1 <= {sr1[47:0], sr1[63:48]};
      default: ;
    endcase
endmodule
