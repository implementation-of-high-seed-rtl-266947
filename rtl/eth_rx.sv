// eth_rx - Ethernet receiver on an MII (4-bit) PHY interface.
//
// The PHY holds rx_dv high for a whole frame and delivers it a nibble per
// clock, low nibble of each byte first. This block hunts for the
// start-of-frame delimiter (nibbles 5..5 then D), assembles bytes, reads the
// 14-byte Ethernet II header and keeps frames addressed to MY_MAC or to the
// broadcast address whose type is ARP (0806h) or IP (0800h). Their payload
// bytes leave as a byte stream (fr_valid/fr_data, at most one byte every two
// clocks) with fr_sof on the first byte and fr_type telling the upper layer
// which receiver owns it: 0 for ARP, 1 for IP. The stream includes any
// padding and the four FCS bytes; the upper layers stop at their own length
// fields. When rx_dv drops, fr_eof pulses for one clock with fr_ok, which is
// set when the CRC-32 over the frame matched and no rx_er was seen.
//
// The frame-type encoding and the MII signals follow the design description;
// the FCS check, the address filter and the single clock domain (rx_clk is
// taken to be clk) are choices of this implementation.
module eth_rx
  import hsr_pkg::*;
#(
  parameter logic [47:0] MY_MAC = 48'h02_00_00_00_00_01
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  rxd,
  input  logic        rx_dv,
  input  logic        rx_er,
  output logic        fr_valid,
  output logic [7:0]  fr_data,
  output logic        fr_sof,
  output frame_type_t fr_type,
  output logic        fr_eof,
  output logic        fr_ok
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_HDR, S_PAY, S_DROP} state_t;
  state_t      state;
  logic [3:0]  lo_nib;
  logic        have_lo;
  logic [3:0]  hcnt;
  logic [47:0] dst_mac;
  logic [7:0]  etype_hi;
  logic [31:0] crc;
  logic        err;
  logic        first;
  logic [7:0]  byte_in;
  logic [31:0] crc_nxt;

  assign byte_in = {rxd, lo_nib};
  assign crc_nxt = crc32_byte(crc, byte_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      lo_nib   <= '0;
      have_lo  <= 1'b0;
      hcnt     <= '0;
      dst_mac  <= '0;
      etype_hi <= '0;
      crc      <= '1;
      err      <= 1'b0;
      first    <= 1'b0;
      fr_valid <= 1'b0;
      fr_data  <= '0;
      fr_sof   <= 1'b0;
      fr_type  <= FT_ARP;
      fr_eof   <= 1'b0;
      fr_ok    <= 1'b0;
    end else begin
      fr_valid <= 1'b0;
      fr_sof   <= 1'b0;
      fr_eof   <= 1'b0;
      unique case (state)
        S_IDLE: if (rx_dv) state <= S_PRE;
        S_PRE: begin
          if (!rx_dv) state <= S_IDLE;
          else if (rxd == 4'hD) begin
            state   <= S_HDR;
            have_lo <= 1'b0;
            hcnt    <= '0;
            crc     <= '1;
            err     <= rx_er;
          end else if (rxd != 4'h5) state <= S_DROP;
        end
        S_HDR, S_PAY: begin
          if (!rx_dv) begin
            if (state == S_PAY) begin
              fr_eof <= 1'b1;
              fr_ok  <= !err && !have_lo && (crc == CRC_RESIDUE);
            end
            state <= S_IDLE;
          end else begin
            if (rx_er) err <= 1'b1;
            if (!have_lo) begin
              lo_nib  <= rxd;
              have_lo <= 1'b1;
            end else begin
              have_lo <= 1'b0;
              crc     <= crc_nxt;
              if (state == S_HDR) begin
                hcnt <= hcnt + 4'd1;
                if (hcnt < 4'd6) dst_mac <= {dst_mac[39:0], byte_in};
                if (hcnt == 4'd12) etype_hi <= byte_in;
                if (hcnt == 4'd13) begin
                  if ((dst_mac == MY_MAC || dst_mac == MAC_BCAST) &&
                      ({etype_hi, byte_in} == ETYPE_IP || {etype_hi, byte_in} == ETYPE_ARP)) begin
                    state   <= S_PAY;
                    first   <= 1'b1;
                    fr_type <= ({etype_hi, byte_in} == ETYPE_IP) ? FT_IP : FT_ARP;
                  end else begin
                    state <= S_DROP;
                  end
                end
              end else begin
                fr_valid <= 1'b1;
                fr_data  <= byte_in;
                fr_sof   <= first;
                first    <= 1'b0;
              end
            end
          end
        end
        S_DROP: if (!rx_dv) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
