// hight_data_ram: dual-port distributed RAM holding the HIGHT state.
//
// Eight bytes X7..X0 of the cipher state live here. Port A reads and writes
// the same address (the byte being updated); port B only reads (the byte that
// feeds F0/F1), so one round byte is computed per cycle. Reads are
// asynchronous, as distributed RAM allows, and writes take effect at the
// rising clock edge. The two ports and their roles follow the document; the
// asynchronous read is this design's choice among the two read modes it lists.
module hight_data_ram #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr_a] <= wdata;

  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];
endmodule
