// tb_hight_key_addr: drives the key address generator through the key use
// pattern of one HIGHT block (4 whitening keys WK0..WK3, 128 subkeys, 4
// whitening keys WK4..WK7) and checks each address against the key byte
// index of the HIGHT key schedule: WK0..3 = K12..K15, subkey 16i+j uses
// K((j-i) mod 8) for j < 8 and K(8 + (j-i) mod 8) otherwise, WK4..7 = K0..K3.
module tb_hight_key_addr;
  logic       clk = 1'b0, init = 1'b0, use_key = 1'b0, hold = 1'b0, msb = 1'b0;
  logic [3:0] addr;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  hight_key_addr dut (.*);

  task automatic expect_addr(int e, string what);
    #1;
    checks++;
    if (addr !== 4'(e)) begin failures++; $display("FAIL %s: addr %0d expected %0d", what, addr, e); end
  endtask

  initial begin
    for (int blk = 0; blk < 2; blk++) begin
      @(negedge clk) init = 1'b1;
      @(negedge clk) init = 1'b0;
      for (int w = 0; w < 4; w++) begin
        use_key = 1'b1; hold = 1'b0; msb = 1'b1;
        expect_addr(12 + w, "WK0..3");
        @(negedge clk);
        use_key = 1'b0;  // idle cycle between whitening keys
        @(negedge clk);
      end
      for (int n = 0; n < 128; n++) begin
        automatic int i = n / 16, j = n % 16;
        use_key = 1'b1; msb = j >= 8; hold = (n % 8) == 7;
        expect_addr((j < 8) ? (j - i + 8) % 8 : 8 + (j - 8 - i + 8) % 8, "SK");
        @(negedge clk);
      end
      for (int w = 0; w < 4; w++) begin
        use_key = 1'b1; hold = 1'b0; msb = 1'b0;
        expect_addr(w, "WK4..7");
        @(negedge clk);
      end
      use_key = 1'b0;
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
