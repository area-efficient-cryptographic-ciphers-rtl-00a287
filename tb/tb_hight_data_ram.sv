// tb_hight_data_ram: checks the dual-port state RAM against an array model:
// random writes through port A, with both asynchronous read ports compared
// every cycle, including a read of the address being written (old data
// until the clock edge).
module tb_hight_data_ram;
  logic       clk = 1'b0, we = 1'b0;
  logic [2:0] addr_a = '0, addr_b = '0;
  logic [7:0] wdata = '0, rdata_a, rdata_b;
  logic [7:0] model [8];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  hight_data_ram dut (.*);

  initial begin
    // fill every word first
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) begin we = 1'b1; addr_a = 3'(i); wdata = 8'($urandom); model[i] = wdata; end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr_a = 3'($urandom);
      addr_b = 3'($urandom);
      wdata = 8'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== model[addr_a]) begin failures++; $display("FAIL A @%0d", addr_a); end
      if (rdata_b !== model[addr_b]) begin failures++; $display("FAIL B @%0d", addr_b); end
      @(posedge clk);
      if (we) model[addr_a] = wdata;
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
