// tb_present_rkgen: two kinds of checks on the round-key function.
//  * Direct: slices 1 and 2 pass unchanged, and in round 1 slice 0 passes
//    unchanged; slice 3 writes back bits 15..9 of its output followed by
//    bits 8..6 XORed with bits 4..2 of the next round number and then
//    bits 8..3.
//  * Stream: a plain 128-bit register with 3-bit registers A and B (the
//    read-side arrangement of the key register, written here from its
//    description) feeds RKgen slice by slice for 32 rounds; the 128 round-key
//    slices must equal the PRESENT-128 key schedule of a random key
//    (rotate left 61, S-box on bits 127..120, counter XOR into bits 66..62).
module tb_present_rkgen;
  logic [15:0]  chunk_in, rk, wb;
  logic [1:0]   slice;
  logic [4:0]   rnd;
  logic [127:0] reg_k, k;
  logic [15:0]  top;
  logic [2:0]   a, b;
  logic [4:0]   nx;
  int checks = 0, failures = 0;
  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  present_rkgen dut (.*);

  task automatic expect16(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      chunk_in = 16'($urandom); rnd = 5'($urandom);
      slice = 2'(1 + n % 2);
      #1;
      expect16(rk, chunk_in, "pass rk"); expect16(wb, chunk_in, "pass wb");
      slice = 2'd0; rnd = 5'd1;
      #1;
      expect16(rk, chunk_in, "round 1 slice 0");
      slice = 2'd3; rnd = 5'($urandom);
      nx = rnd + 5'd1;
      #1;
      expect16(wb, {chunk_in[15:9], chunk_in[8:6] ^ nx[4:2], chunk_in[8:3]}, "slice 3 wb");
    end

    for (int t = 0; t < 20; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      reg_k = k; a = '0; b = '0;
      for (int r = 1; r <= 32; r++) begin
        for (int c = 0; c < 4; c++) begin
          top = reg_k[127:112];
          rnd = 5'(r); slice = 2'(c);
          chunk_in = (r == 1) ? top : (r == 2) ? {a, top[15:3]} : {b, a, top[15:6]};
          #1;
          expect16(rk, k[127 - 16*c -: 16], $sformatf("stream round %0d slice %0d", r, c));
          if (r == 2 && c == 3) b = chunk_in[2:0];
          else if (r >= 3) b = top[5:3];
          a = top[2:0];
          reg_k = {reg_k[111:0], wb};
        end
        k = {k[66:0], k[127:67]};
        k[127:124] = SB[k[127:124]];
        k[123:120] = SB[k[123:120]];
        k[66:62] ^= 5'(r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
