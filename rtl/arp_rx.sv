// arp_rx - ARP receiver.
//
// Takes the payload of frames of type ARP from the Ethernet receiver as a
// byte stream (in_valid/in_data, in_sof on the first byte) and keeps the 28
// bytes of the ARP packet (hardware type, protocol type, lengths, operation,
// sender MAC/IP, target MAC/IP). At in_eof, if in_ok says the frame was good,
// the packet is Ethernet/IPv4 ARP and its target IP is MY_IP:
//   * the sender's IP/MAC pair is written to the ARP table (tbl_upd, one
//     clock): a new pair is inserted, a known IP has its MAC updated;
//   * if it is a request (operation 1), reply_req is raised with the
//     requester's MAC and IP and held until the ARP sender takes it with
//     reply_ack (a two-way handshake). A request arriving while a reply is
//     still pending is answered only by the table update.
// The first byte to the last decision takes the frame length plus one clock.
//
// Table maintenance and the reply request to the ARP sender follow the
// design description; accepting only packets aimed at MY_IP is RFC 826
// practice chosen here.
module arp_rx
  import hsr_pkg::*;
#(
  parameter logic [31:0] MY_IP = 32'hC0A8_0102
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_sof,
  input  logic        in_eof,
  input  logic        in_ok,
  output logic        tbl_upd,
  output logic [31:0] tbl_ip,
  output logic [47:0] tbl_mac,
  output logic        reply_req,
  output logic [47:0] reply_mac,
  output logic [31:0] reply_ip,
  input  logic        reply_ack
);

  logic [8*28-1:0] pkt;
  logic [4:0]      cnt;
  logic            pkt_ok;
  logic [15:0]     htype, ptype, oper;
  logic [7:0]      hlen, plen;
  logic [47:0]     sha;
  logic [31:0]     spa, tpa;

  assign htype = pkt[223:208];
  assign ptype = pkt[207:192];
  assign hlen  = pkt[191:184];
  assign plen  = pkt[183:176];
  assign oper  = pkt[175:160];
  assign sha   = pkt[159:112];
  assign spa   = pkt[111:80];
  assign tpa   = pkt[31:0];
  assign pkt_ok = (cnt == 5'd28) && htype == 16'd1 && ptype == ETYPE_IP &&
                  hlen == 8'd6 && plen == 8'd4 && tpa == MY_IP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt       <= '0;
      cnt       <= '0;
      tbl_upd   <= 1'b0;
      tbl_ip    <= '0;
      tbl_mac   <= '0;
      reply_req <= 1'b0;
      reply_mac <= '0;
      reply_ip  <= '0;
    end else begin
      tbl_upd <= 1'b0;
      if (reply_req && reply_ack) reply_req <= 1'b0;
      if (in_valid) begin
        if (in_sof) begin
          pkt <= {pkt[8*27-1:0], in_data};
          cnt <= 5'd1;
        end else if (cnt < 5'd28) begin
          pkt <= {pkt[8*27-1:0], in_data};
          cnt <= cnt + 5'd1;
        end
      end
      if (in_eof) begin
        cnt <= '0;
        if (in_ok && pkt_ok) begin
          tbl_upd <= 1'b1;
          tbl_ip  <= spa;
          tbl_mac <= sha;
          if (oper == 16'd1 && !reply_req) begin
            reply_req <= 1'b1;
            reply_mac <= sha;
            reply_ip  <= spa;
          end
        end
      end
    end
  end

  // the ARP sender only acknowledges a pending request
  a_ack_only_when_req: assert property (@(posedge clk) disable iff (!rst_n) reply_ack |-> reply_req);

endmodule
