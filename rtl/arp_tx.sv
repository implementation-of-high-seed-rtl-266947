// arp_tx - ARP sender: sits between the IP sender and the Ethernet sender.
//
// It has three jobs. (1) A reply request from the ARP receiver (reply_req
// with the requester's MAC/IP, taken with reply_ack) makes it send an ARP
// reply carrying MY_MAC/MY_IP. (2) A datagram request from the IP sender
// (ip_req with the next-hop address ip_dst, held high) is looked up in the
// ARP table; on a hit the Ethernet frame of type IP is started towards the
// cached MAC, ip_grant pulses, and the IP sender's byte stream
// (ip_valid/ip_data/ip_last, pulled by ip_ready) is passed to the Ethernet
// sender unchanged. (3) On a miss it broadcasts an ARP request for ip_dst
// and keeps the datagram waiting until the table holds the address, giving
// up with ip_fail after ARP_WAIT clocks.
//
// The block only starts a frame while the Ethernet sender is idle
// (eth_busy low), so it is unavailable for the whole time a frame is on the
// wire. A pending reply goes before a waiting datagram. arp_req_sent and
// arp_reply_sent pulse when a request or reply frame is started.
//
// The three jobs follow the design description; the wait-and-drop policy,
// the priority and ARP_WAIT are this design's choices.
module arp_tx
  import hsr_pkg::*;
#(
  parameter logic [47:0] MY_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [31:0] MY_IP    = 32'hC0A8_0102,
  parameter int unsigned ARP_WAIT = 1000000
) (
  input  logic        clk,
  input  logic        rst_n,
  // reply requests from the ARP receiver
  input  logic        reply_req,
  input  logic [47:0] reply_mac,
  input  logic [31:0] reply_ip,
  output logic        reply_ack,
  // datagrams from the IP sender
  input  logic        ip_req,
  input  logic [31:0] ip_dst,
  output logic        ip_grant,
  output logic        ip_fail,
  input  logic        ip_valid,
  input  logic [7:0]  ip_data,
  input  logic        ip_last,
  output logic        ip_ready,
  // ARP table lookup
  output logic [31:0] lk_ip,
  input  logic        lk_hit,
  input  logic [47:0] lk_mac,
  // Ethernet sender
  output logic        eth_req,
  output frame_type_t eth_type,
  output logic [47:0] eth_dst,
  input  logic        eth_busy,
  output logic        pl_valid,
  output logic [7:0]  pl_data,
  output logic        pl_last,
  input  logic        pl_ready,
  output logic        arp_req_sent,
  output logic        arp_reply_sent
);

  typedef enum logic [1:0] {S_IDLE, S_ARP, S_IP} state_t;
  state_t      state;
  logic        waiting;
  logic [31:0] wait_cnt;
  logic [15:0] oper;
  logic [47:0] tha;
  logic [31:0] tpa;
  logic [4:0]  idx;
  logic [8*28-1:0] arp_pkt;

  assign lk_ip   = ip_dst;
  assign arp_pkt = {16'd1, ETYPE_IP, 8'd6, 8'd4, oper, MY_MAC, MY_IP, tha, tpa};

  always_comb begin
    unique case (state)
      S_ARP: begin
        pl_valid = 1'b1;
        pl_data  = arp_pkt[8*(27-idx) +: 8];
        pl_last  = (idx == 5'd27);
        ip_ready = 1'b0;
      end
      S_IP: begin
        pl_valid = ip_valid;
        pl_data  = ip_data;
        pl_last  = ip_last;
        ip_ready = pl_ready;
      end
      default: begin
        pl_valid = 1'b0;
        pl_data  = '0;
        pl_last  = 1'b0;
        ip_ready = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      waiting        <= 1'b0;
      wait_cnt       <= '0;
      oper           <= '0;
      tha            <= '0;
      tpa            <= '0;
      idx            <= '0;
      reply_ack      <= 1'b0;
      ip_grant       <= 1'b0;
      ip_fail        <= 1'b0;
      eth_req        <= 1'b0;
      eth_type       <= FT_ARP;
      eth_dst        <= '0;
      arp_req_sent   <= 1'b0;
      arp_reply_sent <= 1'b0;
    end else begin
      reply_ack      <= 1'b0;
      ip_grant       <= 1'b0;
      ip_fail        <= 1'b0;
      eth_req        <= 1'b0;
      arp_req_sent   <= 1'b0;
      arp_reply_sent <= 1'b0;
      if (waiting && wait_cnt != ARP_WAIT) wait_cnt <= wait_cnt + 1;
      unique case (state)
        S_IDLE: begin
          if (!eth_busy && !eth_req && !reply_ack && !ip_fail) begin
            if (reply_req) begin
              state          <= S_ARP;
              idx            <= '0;
              oper           <= 16'd2;
              tha            <= reply_mac;
              tpa            <= reply_ip;
              eth_req        <= 1'b1;
              eth_type       <= FT_ARP;
              eth_dst        <= reply_mac;
              reply_ack      <= 1'b1;
              arp_reply_sent <= 1'b1;
            end else if (ip_req && lk_hit) begin
              state    <= S_IP;
              eth_req  <= 1'b1;
              eth_type <= FT_IP;
              eth_dst  <= lk_mac;
              ip_grant <= 1'b1;
              waiting  <= 1'b0;
            end else if (ip_req && !waiting) begin
              state        <= S_ARP;
              idx          <= '0;
              oper         <= 16'd1;
              tha          <= '0;
              tpa          <= ip_dst;
              eth_req      <= 1'b1;
              eth_type     <= FT_ARP;
              eth_dst      <= MAC_BCAST;
              waiting      <= 1'b1;
              wait_cnt     <= '0;
              arp_req_sent <= 1'b1;
            end else if (ip_req && waiting && wait_cnt == ARP_WAIT) begin
              ip_fail <= 1'b1;
              waiting <= 1'b0;
            end
          end
        end
        S_ARP: if (pl_ready) begin
          idx <= idx + 5'd1;
          if (idx == 5'd27) state <= S_IDLE;
        end
        S_IP: if (pl_ready && ip_last) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
