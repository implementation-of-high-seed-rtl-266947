// stack_ram - the shared data RAM of the router: 2**AW bytes with one write
// port and one read port (simple dual port, one clock for each). A write
// (we) stores wdata at waddr at the clock edge; a read (re) presents the
// byte at raddr on rdata after the next edge, where it stays until the next
// read. Both ports may be used in the same clock; reading the address being
// written returns the old byte.
//
// That the stack holds one RAM shared by the layers and the PC follows the
// design description; its size and port structure are this design's.
module stack_ram #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
