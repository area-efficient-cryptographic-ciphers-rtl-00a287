// tb_hight_key_ram: checks the single-port key RAM: all sixteen bytes are
// written, then read back in random order, then overwritten at random and
// read again, compared with an array model.
module tb_hight_key_ram;
  logic       clk = 1'b0, we = 1'b0;
  logic [3:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [16];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  hight_key_ram dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin we = 1'b1; addr = 4'(i); wdata = 8'($urandom); model[i] = wdata; end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom % 4) == 0;
      addr = 4'($urandom);
      wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL @%0d", addr); end
      @(posedge clk);
      if (we) model[addr] = wdata;
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
