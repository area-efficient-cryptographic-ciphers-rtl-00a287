// tb_present_state_path: runs the state datapath through rounds with random
// round keys and compares the state with the PRESENT round (key XOR, S-box
// layer, bit permutation P(i) = 16*i mod 63) computed here. The first round
// takes the plaintext through the Data-in multiplexer; later rounds use SR1.
// After each round the state is read out with the output operation
// (16-bit rotations of SR1, XOR with a random key slice), which also
// restores SR1 after four cycles.
module tb_present_state_path;
  import present_pkg::*;
  logic        clk = 1'b0, sel_din = 1'b0;
  present_op_t op = SOP_HOLD;
  logic [15:0] din = '0, rk = '0, dout;
  logic [63:0] st, t, rkey, okey;
  int checks = 0, failures = 0;
  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  always #5 clk = ~clk;

  present_state_path dut (.*);

  initial begin
    for (int blk = 0; blk < 4; blk++) begin
      st = {$urandom, $urandom};
      @(negedge clk);
      for (int r = 0; r < 6; r++) begin
        rkey = {$urandom, $urandom};
        for (int c = 0; c < 4; c++) begin
          op = SOP_COMPUTE; sel_din = (r == 0); din = st[63 - 16*c -: 16];
          rk = rkey[63 - 16*c -: 16];
          @(negedge clk);
        end
        op = SOP_COPY; sel_din = 1'b0;
        repeat (4) @(negedge clk);
        st = st ^ rkey;
        for (int i = 0; i < 16; i++) st[4*i +: 4] = SB[st[4*i +: 4]];
        for (int i = 0; i < 64; i++) t[(i == 63) ? 63 : (16 * i) % 63] = st[i];
        st = t;
        okey = {$urandom, $urandom};
        for (int c = 0; c < 4; c++) begin
          op = SOP_OUT; rk = okey[63 - 16*c -: 16];
          #1;
          checks++;
          if (dout !== (st[63 - 16*c -: 16] ^ rk)) begin
            failures++; $display("FAIL blk %0d round %0d word %0d: %h", blk, r, c, dout);
          end
          @(negedge clk);
        end
        op = SOP_HOLD; rk = '0;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
