// tb_hight_addr_gen: drives the address generator with the phase sequence
// of a HIGHT block and checks every address against the placement rule
// "logical byte j of round i is at physical address (i - j + 7) mod 8":
// loading writes byte j at 7 - j, round i cycle k updates byte 2k+1 (port A)
// reading byte 2k (port B), and the output phase reads byte j of the
// final state at (6 - j) mod 8. Also checks C3.
module tb_hight_addr_gen;
  import hight_pkg::*;
  logic         clk = 1'b0, rst_n = 1'b0, c3_clr = 1'b1;
  hight_phase_t phase = PH_IDLE;
  logic [2:0]   c3, addr_a, addr_b;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  hight_addr_gen dut (.*);

  function automatic int place(int i, int j);
    return ((i - j + 7) % 8 + 8) % 8;
  endfunction

  task automatic chk(int got, int e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, e); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 2; blk++) begin
      phase = PH_IDLE; c3_clr = 1'b1;
      @(negedge clk);
      phase = PH_LOAD;
      for (int j = 0; j < 8; j++) begin
        c3_clr = (j == 7);
        #1;
        chk(c3, j, "C3 load");
        chk(addr_a, place(0, j), "load addr");
        @(negedge clk);
      end
      phase = PH_ROUND;
      for (int r = 0; r < 32; r++)
        for (int k = 0; k < 4; k++) begin
          c3_clr = (r == 31) && (k == 3);
          #1;
          chk(addr_a, place(r, 2*k + 1), "round port A");
          chk(addr_b, place(r, 2*k), "round port B");
          @(negedge clk);
        end
      phase = PH_FINAL; c3_clr = 1'b0;
      for (int j = 0; j < 8; j++) begin
        #1;
        chk(addr_a, place(32, (j + 1) % 8), "final addr");
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
