// pc_sram_if - the PC's access to the router's RAM.
//
// The PC sends bytes on pc_din, each marked by a one-clock pc_stb, forming
// commands:
//   01h, address high, address low, data  - write data to RAM[address]
//   02h, address high, address low        - read RAM[address]
// The address is big-endian and its upper bits beyond AW are ignored. Once
// a command is complete the interface requests the RAM through the memory
// multiplexor (mem_we or mem_re, held until granted); a read returns the
// byte on pc_dout with a one-clock pc_dout_valid. pc_busy is high from the
// last byte of a command until it has been carried out; bytes strobed then
// are ignored, as are unknown command bytes (counted in n_bad).
//
// That this interface carries the PC's RAM accesses follows the design
// description; the byte protocol is this design's.
module pc_sram_if #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pc_stb,
  input  logic [7:0]    pc_din,
  output logic [7:0]    pc_dout,
  output logic          pc_dout_valid,
  output logic          pc_busy,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [7:0]    mem_wdata,
  input  logic          mem_wgnt,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  logic          mem_rgnt,
  input  logic          mem_rvalid,
  input  logic [7:0]    mem_rdata,
  output logic [7:0]    n_bad
);
  localparam logic [7:0] CMD_WRITE = 8'h01;
  localparam logic [7:0] CMD_READ  = 8'h02;

  typedef enum logic [2:0] {S_CMD, S_AH, S_AL, S_DATA, S_WRITE, S_READ, S_RWAIT} state_t;
  state_t      state;
  logic        is_write;
  logic [15:0] addr;
  logic [7:0]  data;

  assign pc_busy   = (state == S_WRITE) || (state == S_READ) || (state == S_RWAIT);
  assign mem_we    = (state == S_WRITE);
  assign mem_waddr = addr[AW-1:0];
  assign mem_wdata = data;
  assign mem_re    = (state == S_READ);
  assign mem_raddr = addr[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_CMD;
      is_write      <= 1'b0;
      addr          <= '0;
      data          <= '0;
      pc_dout       <= '0;
      pc_dout_valid <= 1'b0;
      n_bad         <= '0;
    end else begin
      pc_dout_valid <= 1'b0;
      unique case (state)
        S_CMD: if (pc_stb) begin
          if (pc_din == CMD_WRITE || pc_din == CMD_READ) begin
            is_write <= (pc_din == CMD_WRITE);
            state    <= S_AH;
          end else n_bad <= n_bad + 8'd1;
        end
        S_AH: if (pc_stb) begin
          addr[15:8] <= pc_din;
          state      <= S_AL;
        end
        S_AL: if (pc_stb) begin
          addr[7:0] <= pc_din;
          state     <= is_write ? S_DATA : S_READ;
        end
        S_DATA: if (pc_stb) begin
          data  <= pc_din;
          state <= S_WRITE;
        end
        S_WRITE: if (mem_wgnt) state <= S_CMD;
        S_READ:  if (mem_rgnt) state <= S_RWAIT;
        S_RWAIT: if (mem_rvalid) begin
          pc_dout       <= mem_rdata;
          pc_dout_valid <= 1'b1;
          state         <= S_CMD;
        end
        default: state <= S_CMD;
      endcase
    end
  end

endmodule
