// memory_mux - gives the RAM's ports either to the protocol stack or to the
// PC interface.
//
// Each RAM port is arbitrated on its own, every clock. The stack (UDP
// receiver writing, UDP sender reading) streams at wire speed and cannot
// wait, so it always wins; a PC access is carried out in a clock where the
// stack leaves the port free, and pc_wgnt / pc_rgnt pulse in that clock. The
// read data is returned one clock later to whoever issued the read:
// st_rvalid or pc_rvalid marks it, and the owner of the last read is kept in
// rd_owner.
//
// Sharing the RAM between the PC and the stack follows the design
// description; the fixed priority is this design's.
module memory_mux #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  // stack side
  input  logic          st_we,
  input  logic [AW-1:0] st_waddr,
  input  logic [7:0]    st_wdata,
  input  logic          st_re,
  input  logic [AW-1:0] st_raddr,
  output logic          st_rvalid,
  // PC side
  input  logic          pc_we,
  input  logic [AW-1:0] pc_waddr,
  input  logic [7:0]    pc_wdata,
  output logic          pc_wgnt,
  input  logic          pc_re,
  input  logic [AW-1:0] pc_raddr,
  output logic          pc_rgnt,
  output logic          pc_rvalid,
  // RAM
  output logic          ram_we,
  output logic [AW-1:0] ram_waddr,
  output logic [7:0]    ram_wdata,
  output logic          ram_re,
  output logic [AW-1:0] ram_raddr
);

  typedef enum logic {OWN_STACK, OWN_PC} owner_t;
  owner_t rd_owner;
  logic   rd_pend;

  always_comb begin
    pc_wgnt   = pc_we && !st_we;
    ram_we    = st_we || pc_we;
    ram_waddr = st_we ? st_waddr : pc_waddr;
    ram_wdata = st_we ? st_wdata : pc_wdata;
    pc_rgnt   = pc_re && !st_re;
    ram_re    = st_re || pc_re;
    ram_raddr = st_re ? st_raddr : pc_raddr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_owner <= OWN_STACK;
      rd_pend  <= 1'b0;
    end else begin
      rd_pend <= ram_re;
      if (ram_re) rd_owner <= st_re ? OWN_STACK : OWN_PC;
    end
  end

  assign st_rvalid = rd_pend && (rd_owner == OWN_STACK);
  assign pc_rvalid = rd_pend && (rd_owner == OWN_PC);

endmodule
