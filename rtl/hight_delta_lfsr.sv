// hight_delta_lfsr: generator of the HIGHT subkey constants.
//
// HIGHT adds a 7-bit constant delta_i to each of its 128 subkeys. The
// constants are successive states of a 7-bit LFSR with polynomial
// x^7 + x^3 + 1, seeded with 0x5A: the new top bit is bit 3 XOR bit 0 and the
// register shifts right. `init` loads the seed, `step` advances one constant;
// `delta` is the current constant. The document shows a 7-bit LFSR beside
// the key path; its polynomial and seed are those of the HIGHT cipher.
module hight_delta_lfsr
  import hight_pkg::*;
(
  input  logic       clk,
  input  logic       init,
  input  logic       step,
  output logic [6:0] delta
);
  always_ff @(posedge clk)
    if (init)      delta <= DELTA0;
    else if (step) delta <= {delta[3] ^ delta[0], delta[6:1]};
endmodule
