// tb_present_sbox: exhaustive check of the 16 S-box entries against the
// PRESENT table, and that the map is a permutation.
module tb_present_sbox;
  logic [3:0] x, y;
  logic [15:0] seen = '0;
  int checks = 0, failures = 0;
  localparam logic [63:0] TABLE = 64'h21748FE3DA09B65C;  // S(15)..S(0)

  present_sbox dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (y !== TABLE[4*i +: 4]) begin failures++; $display("FAIL S(%h)=%h", x, y); end
      seen[y] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL not a permutation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
