// hight_key_ram: single-port distributed RAM holding the 128-bit HIGHT key.
//
// The key is stored as sixteen bytes, K0 at address 0 up to K15 at address
// 15. The key bytes are needed in a different order for the whitening keys
// and for the subkeys, which a RAM serves by addressing where a shift
// register could not. Synchronous write, asynchronous read on the same
// address port.
module hight_key_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
