// present_sbox: the PRESENT 4-bit to 4-bit substitution box.
//
// A single 16-entry lookup table (one 4-input LUT per output bit on an
// FPGA). The table is the one of the PRESENT cipher:
// S = C 5 6 B 9 0 A D 3 E F 8 4 7 1 2 for inputs 0..F. Combinational.
module present_sbox (
  input  logic [3:0] x,
  output logic [3:0] y
);
  always_comb begin
    unique case (x)
      4'h0: y = 4'hC;  4'h1: y = 4'h5;  4'h2: y = 4'h6;  4'h3: y = 4'hB;
      4'h4: y = 4'h9;  4'h5: y = 4'h0;  4'h6: y = 4'hA;  4'h7: y = 4'hD;
      4'h8: y = 4'h3;  4'h9: y = 4'hE;  4'hA: y = 4'hF;  4'hB: y = 4'h8;
      4'hC: y = 4'h4;  4'hD: y = 4'h7;  4'hE: y = 4'h1;  default: y = 4'h2;
    endcase
  end
endmodule
