// tb_hight_delta_lfsr: compares the 128 LFSR states with the HIGHT constant
// sequence built from its bit recurrence s(i+6) = s(i+2) ^ s(i-1),
// s0..s6 = 0,1,0,1,1,0,1, delta_i = s(i+6)..s(i); checks that `init`
// restarts the sequence and that the register holds without `step`.
module tb_hight_delta_lfsr;
  logic       clk = 1'b0, init = 1'b0, step = 1'b0;
  logic [6:0] delta;
  logic       s [140];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  hight_delta_lfsr dut (.*);

  function automatic logic [6:0] expect_delta(int i);
    logic [6:0] d;
    for (int b = 0; b < 7; b++) d[b] = s[i + b];
    return d;
  endfunction

  initial begin
    s[0] = 0; s[1] = 1; s[2] = 0; s[3] = 1; s[4] = 1; s[5] = 0; s[6] = 1;
    for (int i = 1; i < 134; i++) s[i+6] = s[i+2] ^ s[i-1];
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) begin init = 1'b1; step = 1'b0; end
      @(negedge clk) init = 1'b0;
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (delta !== expect_delta(i)) begin failures++; $display("FAIL delta_%0d=%h", i, delta); end
        step = (i % 5) != 4 || pass == 0;
        @(negedge clk);
        if (!step) begin
          checks++;
          if (delta !== expect_delta(i)) begin failures++; $display("FAIL hold at %0d", i); end
          step = 1'b1;
          @(negedge clk);
        end
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
