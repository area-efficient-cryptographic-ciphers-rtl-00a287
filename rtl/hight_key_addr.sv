// hight_key_addr: key RAM address generator of the HIGHT core.
//
// HIGHT's subkeys take the key bytes K0..K7 (and K8..K15) in groups of
// eight, each group starting one byte earlier than the last
// (K0..K7, then K7,K0..K6, then K6,K7,K0..K5, ...). Two 3-bit counters, C1
// for the lower key half and C2 for the upper half, produce this: the counter
// of the half in use advances on each key byte consumed, except on the last
// byte of a group of eight (`hold`), where it keeps its value and so starts
// the next group one byte earlier. Multiplexer M5 picks the counter with the
// address MSB, which the controller derives from its round counter. C2 is
// preset to 4 so that the same counter also supplies the whitening keys
// WK0..WK3 = K12..K15 before the rounds and then wraps to 0; C1 returns to 0
// after the 64 subkey bytes of its half and supplies WK4..WK7 = K0..K3
// after the rounds. The counters and M5 follow the document; the hold rule
// and the presets are this design's way of producing the HIGHT order.
module hight_key_addr (
  input  logic       clk,
  input  logic       init,
  input  logic       use_key,
  input  logic       hold,
  input  logic       msb,
  output logic [3:0] addr
);
  logic [2:0] c1, c2;

  always_ff @(posedge clk)
    if (init) begin
      c1 <= 3'd0;
      c2 <= 3'd4;
    end else if (use_key && !hold) begin
      if (msb) c2 <= c2 + 3'd1;
      else     c1 <= c1 + 3'd1;
    end

  assign addr = {msb, msb ? c2 : c1};  // M5
endmodule
