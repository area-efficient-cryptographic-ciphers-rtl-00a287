// hight_round_fn: the combinational byte datapath of the HIGHT core.
//
// One byte of the state is updated per cycle. x_a is the byte being updated
// (the plaintext byte during loading, otherwise port A of the state RAM) and
// x_b the neighbouring byte that feeds F0 or F1 (port B). The subkey is formed
// here as key byte + delta (mod 2^8). Two paths exist, as in the document's
// datapath: an XOR path whose second operand (multiplexer M2) is either
// F0(x_b) + SK or a whitening key byte, and an addition path whose second
// operand (multiplexer M3) is either F1(x_b) ^ SK or a whitening key byte.
// Multiplexer M4 picks the XOR result, the sum, or x_a unchanged. Purely
// combinational: the result is written back in the same cycle.
module hight_round_fn
  import hight_pkg::*;
(
  input  hight_op_t  op,
  input  logic [7:0] x_a,
  input  logic [7:0] x_b,
  input  logic [7:0] key_byte,
  input  logic [6:0] delta,
  output logic [7:0] y
);
  logic       whiten;
  logic [7:0] sk, m2, m3;

  assign whiten = (op == OP_ADD_WK) || (op == OP_XOR_WK);
  assign sk     = key_byte + {1'b0, delta};
  assign m2     = whiten ? key_byte : hight_f0(x_b) + sk;
  assign m3     = whiten ? key_byte : hight_f1(x_b) ^ sk;

  always_comb begin
    unique case (op)
      OP_ADD_WK, OP_RND_F1: y = x_a + m3;
      OP_XOR_WK, OP_RND_F0: y = x_a ^ m2;
      default:              y = x_a;
    endcase
  end
endmodule
