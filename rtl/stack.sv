// stack - top level of the high-speed router: an Ethernet/ARP/IP/ICMP/UDP
// protocol stack with a RAM shared between the stack and a PC.
//
// Receive path: the MII nibbles from the PHY enter eth_rx, which passes ARP
// frames to arp_rx and IP frames to ip_rx. arp_rx keeps arp_table and asks
// arp_tx for replies. ip_rx hands ICMP messages to icmp (echo responder)
// and UDP datagrams, reassembled from fragments where needed, to udp_rx,
// which stores the data of datagrams for UDP_PORT in the RAM and signals
// udp_msg_valid until udp_msg_ack.
//
// Send path: icmp replies and udp_tx datagrams (data read from the RAM,
// started with udp_send) meet in hdlc, which hands one at a time to ip_tx.
// ip_tx builds (and if needed fragments) IP datagrams for arp_tx, which
// resolves the MAC address through arp_table (sending an ARP request on a
// miss) and feeds eth_tx, which drives the MII.
//
// RAM: stack_ram (2**RAM_AW bytes) is shared through memory_mux between the
// stack (udp_rx writes the lower half, udp_tx reads where udp_base points)
// and pc_sram_if, the PC's byte-command port. Everything runs on clk; the
// MII receive and transmit clocks are taken to be this clock (25 MHz for
// 100 Mb/s). Event counters are brought out on stats.
//
// A few block outputs are left unread here because the reader already knows
// what they say: the stream last-byte markers (the pulling side counts
// lengths), the stack's read-valid from memory_mux (udp_tx times its own
// reads), ip_tx busy and the hdlc grant counters.
//
// The set of layers and how they connect follow the design description;
// the interfaces between them, the addresses and sizes are this design's.
module stack
  import hsr_pkg::*;
#(
  parameter logic [47:0] MY_MAC      = 48'h02_00_00_00_00_01,
  parameter logic [31:0] MY_IP       = 32'hC0A8_0102,
  parameter logic [15:0] UDP_PORT    = 16'd5000,
  parameter int unsigned RAM_AW      = 14,
  parameter int unsigned ARP_ENTRIES = 8,
  parameter int unsigned MTU         = 1500,
  parameter int unsigned ARP_WAIT    = 1000000,
  parameter int unsigned ICMP_BUF    = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // MII to the PHY
  input  logic [3:0]        rxd,
  input  logic              rx_dv,
  input  logic              rx_er,
  output logic [3:0]        txd,
  output logic              tx_en,
  // PC port
  input  logic              pc_stb,
  input  logic [7:0]        pc_din,
  output logic [7:0]        pc_dout,
  output logic              pc_dout_valid,
  output logic              pc_busy,
  // UDP send control
  input  logic              udp_send,
  input  logic [31:0]       udp_dst_ip,
  input  logic [15:0]       udp_dst_port,
  input  logic [15:0]       udp_src_port,
  input  logic [15:0]       udp_len,
  input  logic [RAM_AW-1:0] udp_base,
  output logic              udp_busy,
  output logic              udp_done,
  // UDP receive status
  output logic              udp_msg_valid,
  output logic [15:0]       udp_msg_len,
  output logic [31:0]       udp_msg_src_ip,
  output logic [15:0]       udp_msg_src_port,
  input  logic              udp_msg_ack,
  output stack_stats_t      stats
);

  // ---------------- Ethernet receive and demultiplex ----------------
  logic        fr_valid, fr_sof, fr_eof, fr_ok;
  logic [7:0]  fr_data;
  frame_type_t fr_type;

  eth_rx #(.MY_MAC(MY_MAC)) u_eth_rx (
    .clk, .rst_n, .rxd, .rx_dv, .rx_er,
    .fr_valid, .fr_data, .fr_sof, .fr_type, .fr_eof, .fr_ok
  );

  logic is_arp, is_ip;
  assign is_arp = (fr_type == FT_ARP);
  assign is_ip  = (fr_type == FT_IP);

  // ---------------- ARP ----------------
  logic        tbl_upd;
  logic [31:0] tbl_ip;
  logic [47:0] tbl_mac;
  logic        reply_req, reply_ack;
  logic [47:0] reply_mac;
  logic [31:0] reply_ip;
  logic [31:0] lk_ip;
  logic        lk_hit;
  logic [47:0] lk_mac;
  logic [$clog2(ARP_ENTRIES+1)-1:0] n_arp;

  arp_rx #(.MY_IP(MY_IP)) u_arp_rx (
    .clk, .rst_n,
    .in_valid(fr_valid && is_arp), .in_data(fr_data), .in_sof(fr_sof),
    .in_eof(fr_eof && is_arp), .in_ok(fr_ok),
    .tbl_upd, .tbl_ip, .tbl_mac, .reply_req, .reply_mac, .reply_ip, .reply_ack
  );

  arp_table #(.ENTRIES(ARP_ENTRIES)) u_arp_table (
    .clk, .rst_n, .upd(tbl_upd), .upd_ip(tbl_ip), .upd_mac(tbl_mac),
    .lk_ip, .lk_hit, .lk_mac, .n_valid(n_arp)
  );

  // ---------------- IP receive, ICMP, UDP receive ----------------
  logic        pl_valid, pl_sof, pl_last, pl_end, pl_ok, sel_icmp, sel_udp;
  logic [7:0]  pl_data;
  logic [31:0] pl_src;
  logic [15:0] pl_len, pl_pos, pl_tot;
  logic        pl_new, pl_done;

  ip_rx #(.MY_IP(MY_IP)) u_ip_rx (
    .clk, .rst_n,
    .in_valid(fr_valid && is_ip), .in_data(fr_data), .in_sof(fr_sof),
    .in_eof(fr_eof && is_ip), .in_ok(fr_ok),
    .pl_valid, .pl_data, .pl_sof, .pl_last, .pl_end, .pl_ok, .sel_icmp, .sel_udp,
    .pl_src, .pl_len, .pl_pos, .pl_new, .pl_done, .pl_tot, .n_frag(stats.ip_frag_drops), .n_csum_err(stats.ip_csum_errors)
  );

  logic        icmp_req, icmp_ack, icmp_valid, icmp_last, icmp_ready;
  logic [31:0] icmp_dst;
  logic [15:0] icmp_len;
  logic [7:0]  icmp_data;

  icmp #(.BUF_BYTES(ICMP_BUF)) u_icmp (
    .clk, .rst_n,
    .in_valid(pl_valid), .in_sel(sel_icmp), .in_data(pl_data), .in_sof(pl_sof),
    .in_end(pl_end), .in_ok(pl_ok), .in_src(pl_src), .in_len(pl_len),
    .req(icmp_req), .req_dst(icmp_dst), .req_len(icmp_len), .req_ack(icmp_ack),
    .out_valid(icmp_valid), .out_data(icmp_data), .out_last(icmp_last), .out_ready(icmp_ready),
    .n_echo(stats.icmp_echos)
  );

  logic              st_we, st_re, st_rvalid;
  logic [RAM_AW-1:0] st_waddr, st_raddr;
  logic [7:0]        st_wdata, ram_rdata;

  udp_rx #(.UDP_PORT(UDP_PORT), .AW(RAM_AW), .RX_BASE('0), .RX_MAX(2 ** (RAM_AW - 1))) u_udp_rx (
    .clk, .rst_n,
    .in_valid(pl_valid), .in_sel(sel_udp), .in_data(pl_data), .in_sof(pl_sof),
    .in_new(pl_new), .in_pos(pl_pos), .in_done(pl_done), .in_tot(pl_tot), .in_src(pl_src),
    .wr_en(st_we), .wr_addr(st_waddr), .wr_data(st_wdata),
    .msg_valid(udp_msg_valid), .msg_len(udp_msg_len), .msg_src_ip(udp_msg_src_ip),
    .msg_src_port(udp_msg_src_port), .msg_ack(udp_msg_ack), .n_drop(stats.udp_drops)
  );

  // ---------------- UDP send ----------------
  logic        udpt_req, udpt_ack, udpt_valid, udpt_last, udpt_ready;
  logic [31:0] udpt_dst;
  logic [15:0] udpt_len;
  logic [7:0]  udpt_data;

  udp_tx #(.AW(RAM_AW)) u_udp_tx (
    .clk, .rst_n, .send(udp_send), .dst_ip(udp_dst_ip), .dst_port(udp_dst_port),
    .src_port(udp_src_port), .len(udp_len), .base(udp_base), .busy(udp_busy), .done(udp_done),
    .req(udpt_req), .req_dst(udpt_dst), .req_len(udpt_len), .req_ack(udpt_ack),
    .out_valid(udpt_valid), .out_data(udpt_data), .out_last(udpt_last), .out_ready(udpt_ready),
    .rd_en(st_re), .rd_addr(st_raddr), .rd_data(ram_rdata)
  );

  // ---------------- hand-over to the send side ----------------
  logic        ipt_req, ipt_ack, ipt_done, ipt_busy;
  logic [31:0] ipt_dst;
  logic [7:0]  ipt_proto;
  logic [15:0] ipt_len;
  logic        up_valid, up_ready;
  logic [7:0]  up_data;
  logic [1:0][7:0] grants;

  hdlc #(.N(2)) u_hdlc (
    .clk, .rst_n,
    .src_req({udpt_req, icmp_req}), .src_dst({udpt_dst, icmp_dst}),
    .src_proto({PROTO_UDP, PROTO_ICMP}), .src_len({udpt_len, icmp_len}),
    .src_ack({udpt_ack, icmp_ack}), .src_valid({udpt_valid, icmp_valid}),
    .src_data({udpt_data, icmp_data}), .src_ready({udpt_ready, icmp_ready}),
    .ip_req(ipt_req), .ip_dst(ipt_dst), .ip_proto(ipt_proto), .ip_len(ipt_len),
    .ip_ack(ipt_ack), .ip_done(ipt_done), .up_valid, .up_data, .up_ready, .grants
  );

  // ---------------- IP send, ARP send, Ethernet send ----------------
  logic        a_req, a_grant, a_fail, dn_valid, dn_last, dn_ready;
  logic [31:0] a_dst;
  logic [7:0]  dn_data;

  ip_tx #(.MY_IP(MY_IP), .MTU(MTU)) u_ip_tx (
    .clk, .rst_n, .req(ipt_req), .req_dst(ipt_dst), .req_proto(ipt_proto), .req_len(ipt_len),
    .req_ack(ipt_ack), .busy(ipt_busy), .done(ipt_done),
    .up_valid, .up_data, .up_ready,
    .ip_req(a_req), .ip_dst(a_dst), .ip_grant(a_grant), .ip_fail(a_fail),
    .dn_valid, .dn_data, .dn_last, .dn_ready, .n_frags(stats.ip_frags_sent)
  );

  logic        e_req, e_busy, e_valid, e_last, e_ready, e_underrun;
  frame_type_t e_type;
  logic [47:0] e_dst;
  logic [7:0]  e_data;
  logic        arp_req_sent, arp_reply_sent;

  arp_tx #(.MY_MAC(MY_MAC), .MY_IP(MY_IP), .ARP_WAIT(ARP_WAIT)) u_arp_tx (
    .clk, .rst_n, .reply_req, .reply_mac, .reply_ip, .reply_ack,
    .ip_req(a_req), .ip_dst(a_dst), .ip_grant(a_grant), .ip_fail(a_fail),
    .ip_valid(dn_valid), .ip_data(dn_data), .ip_last(dn_last), .ip_ready(dn_ready),
    .lk_ip, .lk_hit, .lk_mac,
    .eth_req(e_req), .eth_type(e_type), .eth_dst(e_dst), .eth_busy(e_busy),
    .pl_valid(e_valid), .pl_data(e_data), .pl_last(e_last), .pl_ready(e_ready),
    .arp_req_sent, .arp_reply_sent
  );

  eth_tx #(.MY_MAC(MY_MAC)) u_eth_tx (
    .clk, .rst_n, .req(e_req), .req_type(e_type), .req_dst_mac(e_dst), .busy(e_busy),
    .pl_valid(e_valid), .pl_data(e_data), .pl_last(e_last), .pl_ready(e_ready),
    .underrun(e_underrun), .txd, .tx_en
  );

  // ---------------- RAM shared by the stack and the PC ----------------
  logic              pc_we, pc_wgnt, pc_re, pc_rgnt, pc_rvalid;
  logic [RAM_AW-1:0] pc_waddr, pc_raddr;
  logic [7:0]        pc_wdata;
  logic              ram_we, ram_re;
  logic [RAM_AW-1:0] ram_waddr, ram_raddr;
  logic [7:0]        ram_wdata;

  pc_sram_if #(.AW(RAM_AW)) u_pc_if (
    .clk, .rst_n, .pc_stb, .pc_din, .pc_dout, .pc_dout_valid, .pc_busy,
    .mem_we(pc_we), .mem_waddr(pc_waddr), .mem_wdata(pc_wdata), .mem_wgnt(pc_wgnt),
    .mem_re(pc_re), .mem_raddr(pc_raddr), .mem_rgnt(pc_rgnt), .mem_rvalid(pc_rvalid),
    .mem_rdata(ram_rdata), .n_bad(stats.pc_bad_cmds)
  );

  memory_mux #(.AW(RAM_AW)) u_mem_mux (
    .clk, .rst_n,
    .st_we, .st_waddr, .st_wdata, .st_re, .st_raddr, .st_rvalid,
    .pc_we, .pc_waddr, .pc_wdata, .pc_wgnt, .pc_re, .pc_raddr, .pc_rgnt, .pc_rvalid,
    .ram_we, .ram_waddr, .ram_wdata, .ram_re, .ram_raddr
  );

  stack_ram #(.AW(RAM_AW)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  // ---------------- event counters kept here ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats.rx_bad_frames <= '0;
      stats.arp_requests  <= '0;
      stats.arp_replies   <= '0;
      stats.arp_drops     <= '0;
      stats.tx_underruns  <= '0;
    end else begin
      if (fr_eof && !fr_ok)  stats.rx_bad_frames <= stats.rx_bad_frames + 8'd1;
      if (arp_req_sent)      stats.arp_requests  <= stats.arp_requests + 8'd1;
      if (arp_reply_sent)    stats.arp_replies   <= stats.arp_replies + 8'd1;
      if (a_fail)            stats.arp_drops     <= stats.arp_drops + 8'd1;
      if (e_underrun)        stats.tx_underruns  <= stats.tx_underruns + 8'd1;
    end
  end
  assign stats.arp_entries = 8'(n_arp);

endmodule
