// eth_tx - Ethernet sender on an MII (4-bit) PHY interface.
//
// A frame starts with a one-clock req while busy is low; req_type chooses
// the Ethernet type (0 = ARP 0806h, 1 = IP 0800h) and req_dst_mac the
// destination. The sender then emits, a nibble per clock and low nibble
// first, 7 bytes of 55h and the SFD D5h, the destination MAC, MY_MAC, the
// type, the payload, zero padding up to the 46-byte minimum payload and the
// CRC-32 FCS, and finally keeps tx_en low for a 12-byte inter-frame gap.
// busy stays high from req to the end of that gap.
//
// Payload bytes are pulled with pl_ready (a one-clock strobe, at most one
// every two clocks); the source must present pl_valid/pl_data/pl_last
// whenever pl_ready can come, because an MII frame cannot pause. A missing
// byte is sent as 00h and reported on underrun. The payload must hold at
// least one byte.
//
// The two frame types and the frame-type input follow the design
// description; preamble, padding, FCS and gap are IEEE 802.3.
module eth_tx
  import hsr_pkg::*;
#(
  parameter logic [47:0] MY_MAC = 48'h02_00_00_00_00_01
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  frame_type_t req_type,
  input  logic [47:0] req_dst_mac,
  output logic        busy,
  input  logic        pl_valid,
  input  logic [7:0]  pl_data,
  input  logic        pl_last,
  output logic        pl_ready,
  output logic        underrun,
  output logic [3:0]  txd,
  output logic        tx_en
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_HDR, S_PAY, S_PAD, S_FCS, S_IFG} state_t;
  state_t      state;
  logic        ph;        // 0: low nibble of cur on the wire, 1: high nibble
  logic [7:0]  cur;
  logic        cur_last;
  logic [4:0]  idx;
  logic [5:0]  paycnt;    // payload+pad bytes sent, saturates at 46
  logic [31:0] crc;
  logic [31:0] fcs;
  logic [47:0] dst;
  frame_type_t ftype;
  logic [31:0] crc_cur;

  assign crc_cur  = crc32_byte(crc, cur);
  assign busy     = (state != S_IDLE);
  assign txd      = ph ? cur[7:4] : cur[3:0];
  assign tx_en    = (state != S_IDLE) && (state != S_IFG);
  assign pl_ready = ph && ((state == S_HDR && idx == 5'd13) || (state == S_PAY && !cur_last));

  function automatic logic [7:0] hdr_byte(input logic [4:0] i, input logic [47:0] d, input frame_type_t t);
    logic [15:0] et;
    et = (t == FT_IP) ? ETYPE_IP : ETYPE_ARP;
    if (i < 5'd6)       return d[8*(5-i) +: 8];
    else if (i < 5'd12) return MY_MAC[8*(11-i) +: 8];
    else if (i == 5'd12) return et[15:8];
    else                return et[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ph       <= 1'b0;
      cur      <= '0;
      cur_last <= 1'b0;
      idx      <= '0;
      paycnt   <= '0;
      crc      <= '1;
      fcs      <= '0;
      dst      <= '0;
      ftype    <= FT_ARP;
      underrun <= 1'b0;
    end else begin
      underrun <= 1'b0;
      if (state == S_IDLE) begin
        if (req) begin
          state <= S_PRE;
          idx   <= '0;
          cur   <= 8'h55;
          ph    <= 1'b0;
          dst   <= req_dst_mac;
          ftype <= req_type;
          crc   <= '1;
        end
      end else if (!ph) begin
        ph <= 1'b1;
      end else begin
        ph <= 1'b0;
        unique case (state)
          S_PRE: begin
            if (idx < 5'd7) begin
              idx <= idx + 5'd1;
              cur <= (idx == 5'd6) ? 8'hD5 : 8'h55;
            end else begin
              state <= S_HDR;
              idx   <= '0;
              cur   <= hdr_byte(5'd0, dst, ftype);
            end
          end
          S_HDR: begin
            crc <= crc_cur;
            if (idx < 5'd13) begin
              idx <= idx + 5'd1;
              cur <= hdr_byte(idx + 5'd1, dst, ftype);
            end else begin
              state    <= S_PAY;
              paycnt   <= 6'd1;
              cur      <= pl_valid ? pl_data : 8'h00;
              cur_last <= pl_valid && pl_last;
              underrun <= !pl_valid;
            end
          end
          S_PAY, S_PAD: begin
            crc <= crc_cur;
            if (state == S_PAY && !cur_last) begin
              if (paycnt < 6'd46) paycnt <= paycnt + 6'd1;
              cur      <= pl_valid ? pl_data : 8'h00;
              cur_last <= pl_valid && pl_last;
              underrun <= !pl_valid;
            end else if (paycnt < 6'd46) begin
              state  <= S_PAD;
              paycnt <= paycnt + 6'd1;
              cur    <= 8'h00;
            end else begin
              state <= S_FCS;
              idx   <= '0;
              fcs   <= ~crc_cur;
              cur   <= ~crc_cur[7:0];
            end
          end
          S_FCS: begin
            if (idx < 5'd3) begin
              idx <= idx + 5'd1;
              cur <= fcs[8*(idx+5'd1) +: 8];
            end else begin
              state <= S_IFG;
              idx   <= '0;
              cur   <= '0;
            end
          end
          S_IFG: begin
            if (idx < 5'd11) idx <= idx + 5'd1;
            else state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
