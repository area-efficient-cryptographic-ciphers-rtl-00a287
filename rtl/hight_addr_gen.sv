// hight_addr_gen: address generator for the HIGHT state RAM.
//
// HIGHT rotates its eight state bytes by one position every round. Instead
// of moving bytes, the core writes each new byte over the old byte it
// replaces and lets the addresses move: logical byte j of round i sits at
// physical address (i - j + 7) mod 8. A round updates bytes 2, 4, 6, 0 in
// four cycles k = 0..3; in cycle k port A (multiplexer M8) reads and
// rewrites the address of byte 2k+1, and port B (multiplexer M7) reads byte
// 2k, one address higher (a 3-bit +1 adder). That port-B address is also the
// address of byte 2k+1 in the next round, so it is shifted back into SR, a
// 12-bit shift register holding the four 3-bit write addresses of a round.
// SR is seeded during plaintext loading from the two low bits of counter C3
// (value {~C3[1:0], 0}, through multiplexer M6). C3 counts the bytes of the
// load and output phases and the cycles of a round; loading writes byte
// j = C3 to address ~C3, and the output phase reads byte j from address
// ~(C3 + 1), which undoes the rotation the last round must not perform.
// The structure (SR, C3, M6/M7/M8, +1 adders) follows the document; the
// address formulas are this design's own derivation.
module hight_addr_gen
  import hight_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  hight_phase_t phase,
  input  logic         c3_clr,
  output logic [2:0]   c3,
  output logic [2:0]   addr_a,
  output logic [2:0]   addr_b
);
  logic [2:0] sr [4];   // SR: sr[0] is the address used this cycle
  logic [2:0] m6;
  logic       sr_shift;

  always_ff @(posedge clk)
    if (!rst_n || c3_clr) c3 <= '0;
    else if (phase inside {PH_LOAD, PH_ROUND, PH_FINAL}) c3 <= c3 + 3'd1;

  // M8: port A address (read and write)
  always_comb begin
    unique case (phase)
      PH_LOAD:  addr_a = ~c3;
      PH_FINAL: addr_a = ~(c3 + 3'd1);
      default:  addr_a = sr[0];
    endcase
  end

  // M7: port B address
  assign addr_b = sr[0] + 3'd1;

  // M6: SR input, seed during loading, next-round address during rounds
  assign m6       = (phase == PH_LOAD) ? {~c3[1:0], 1'b0} : addr_b;
  assign sr_shift = (phase == PH_LOAD) || (phase == PH_ROUND);

  always_ff @(posedge clk)
    if (sr_shift) begin
      sr[0] <= sr[1];
      sr[1] <= sr[2];
      sr[2] <= sr[3];
      sr[3] <= m6;
    end
endmodule
