// tb_stack - end-to-end test of the router top level at its default
// parameters. A model host on the MII side sends ARP, ICMP and UDP frames
// and checks every frame the router sends; a model PC writes and reads the
// shared RAM through the byte-command port. The test walks through:
// ARP request/reply with table insert and update, ping, frames dropped for a
// bad FCS, a bad IP checksum and an ICMP fragment, UDP reception into RAM
// read back by the PC while the PC competes with the stack for the RAM, a
// UDP overflow drop, a UDP datagram reassembled from two fragments sent
// last first, UDP sends from RAM (one plain, one fragmented into three
// IP fragments, one that needs an ARP request and one whose ARP request is
// never answered), and the ICMP/UDP hand-over arbitration. Each mechanism
// is counted and one that never happened is a failure.
module tb_stack;
  import hsr_pkg::*;
  import tb_net_pkg::*;

  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_01;
  localparam logic [31:0] MY_IP  = 32'hC0A8_0102;
  localparam logic [47:0] H_MAC  = 48'h02_11_22_33_44_55;
  localparam logic [47:0] H_MAC2 = 48'h02_66_77_88_99_AA;
  localparam logic [47:0] H_MAC3 = 48'h02_AB_CD_EF_01_23;
  localparam logic [31:0] H_IP   = 32'hC0A8_0105;
  localparam logic [31:0] H_IP3  = 32'hC0A8_0107;
  localparam logic [31:0] H_IP4  = 32'hC0A8_0109;
  localparam int unsigned TXBASE = 16'h2000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [3:0]  rxd = '0;
  logic        rx_dv = 1'b0, rx_er = 1'b0;
  logic [3:0]  txd;
  logic        tx_en;
  logic        pc_stb = 1'b0;
  logic [7:0]  pc_din = '0;
  logic [7:0]  pc_dout;
  logic        pc_dout_valid, pc_busy;
  logic        udp_send = 1'b0;
  logic [31:0] udp_dst_ip = '0;
  logic [15:0] udp_dst_port = '0, udp_src_port = '0, udp_len = '0;
  logic [13:0] udp_base = '0;
  logic        udp_busy, udp_done;
  logic        udp_msg_valid;
  logic [15:0] udp_msg_len, udp_msg_src_port;
  logic [31:0] udp_msg_src_ip;
  logic        udp_msg_ack = 1'b0;
  stack_stats_t stats;

  stack dut (.*);

  always #20 clk = ~clk;   // 25 MHz MII clock

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- MII transmit monitor ----------------
  bytes_t txf[64];
  int     ntx = 0;
  initial begin
    bytes_t cur;
    logic [3:0] lo;
    bit half = 0, inf = 0;
    forever begin
      @(negedge clk);
      if (tx_en) begin
        inf = 1;
        if (!half) begin lo = txd; half = 1; end
        else begin cur.push_back({txd, lo}); half = 0; end
      end else if (inf) begin
        txf[ntx % 64] = cur;
        ntx++;
        cur = {};
        inf = 0;
        half = 0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int m_mux_contention = 0, m_arb_both = 0;
  always @(negedge clk) begin
    if (dut.u_mem_mux.pc_we && dut.u_mem_mux.st_we) m_mux_contention++;
    // a source waits while the other one's datagram is being handed over
    if ((|dut.u_hdlc.src_req) && !dut.u_hdlc.ip_req && dut.u_hdlc.state != 0) m_arb_both++;
  end

  // ---------------- host and PC models ----------------
  task automatic send_frame(input bytes_t f, input bit corrupt = 0);
    @(negedge clk);
    rx_dv = 1'b1;
    for (int i = 0; i < 15; i++) begin rxd = 4'h5; @(negedge clk); end
    rxd = 4'hD;
    @(negedge clk);
    foreach (f[i]) begin
      logic [7:0] b;
      b = (corrupt && i == 50) ? ~f[i] : f[i];
      rxd = b[3:0]; @(negedge clk);
      rxd = b[7:4]; @(negedge clk);
    end
    rx_dv = 1'b0;
    rxd = '0;
    repeat (24) @(negedge clk);
  endtask

  task automatic wait_tx(input int n, input int max_cycles);
    int c = 0;
    while (ntx < n && c < max_cycles) begin @(negedge clk); c++; end
    chk(ntx >= n, $sformatf("frame %0d sent within %0d cycles", n, max_cycles));
  endtask

  // checks preamble, SFD, FCS, addresses and type; returns the payload
  function automatic bytes_t eth_check(input bytes_t f, input logic [47:0] dst,
                                       input logic [15:0] etype, output bit ok);
    bytes_t body;
    logic [31:0] fcs;
    ok = (f.size() >= 8 + 64);
    for (int i = 0; i < 7 && ok; i++) ok = (f[i] == 8'h55);
    if (ok) ok = (f[7] == 8'hD5);
    if (!ok) return body;
    body = slice(f, 8, f.size() - 12);
    fcs = {f[f.size()-1], f[f.size()-2], f[f.size()-3], f[f.size()-4]};
    ok = (crc32(body) == fcs) && (get48(body, 0) == dst) && (get48(body, 6) == MY_MAC) &&
         (get16(body, 12) == etype);
    return slice(body, 14, body.size() - 14);
  endfunction

  // checks an IPv4 header from us to dst; returns the payload
  function automatic bytes_t ip_check(input bytes_t p, input logic [31:0] dst,
                                      input logic [7:0] proto, output bit ok,
                                      output logic [15:0] fragw);
    int tl;
    tl    = get16(p, 2);
    fragw = get16(p, 6);
    ok = (p[0] == 8'h45) && (inet_csum(slice(p, 0, 20)) == 16'h0000) && (p[9] == proto) &&
         (get32(p, 12) == MY_IP) && (get32(p, 16) == dst) && (tl <= p.size());
    return slice(p, 20, tl - 20);
  endfunction

  task automatic pc_byte(input logic [7:0] b);
    while (pc_busy) @(negedge clk);
    pc_din = b;
    pc_stb = 1'b1;
    @(negedge clk);
    pc_stb = 1'b0;
    @(negedge clk);
  endtask
  task automatic pc_write(input logic [15:0] a, input logic [7:0] d);
    pc_byte(8'h01); pc_byte(a[15:8]); pc_byte(a[7:0]); pc_byte(d);
  endtask
  task automatic pc_read(input logic [15:0] a, output logic [7:0] d);
    int c = 0;
    pc_byte(8'h02); pc_byte(a[15:8]); pc_byte(a[7:0]);
    while (!pc_dout_valid && c < 1000) begin @(negedge clk); c++; end
    d = pc_dout;
  endtask

  task automatic start_udp(input logic [31:0] ip, input logic [15:0] len);
    @(negedge clk);
    udp_dst_ip = ip; udp_dst_port = 16'd7000; udp_src_port = 16'd5000;
    udp_len = len; udp_base = 14'(TXBASE);
    udp_send = 1'b1;
    @(negedge clk);
    udp_send = 1'b0;
  endtask

  // checks one UDP frame to (mac, ip) carrying data; returns fragw
  task automatic check_udp_frame(input bytes_t f, input logic [47:0] mac, input logic [31:0] ip,
                                 input bytes_t data, input string what);
    bit ok;
    bytes_t p, u;
    logic [15:0] fw;
    p = eth_check(f, mac, 16'h0800, ok);
    chk(ok, {what, ": Ethernet framing"});
    u = ip_check(p, ip, 8'd17, ok, fw);
    chk(ok && fw == 16'h0000, {what, ": IP header"});
    chk(get16(u, 0) == 16'd5000 && get16(u, 2) == 16'd7000 && get16(u, 4) == 16'(8 + data.size()),
        {what, ": UDP header"});
    chk(slice(u, 8, data.size()) == data, {what, ": UDP data"});
  endtask

  // watchdog
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t f, p, q, d, txdata;
    bit ok;
    logic [15:0] fw;
    logic [7:0] rb;
    realtime t_start;
    real mbps;
    int n0, m_arp_reply = 0, m_arp_update = 0, m_echo = 0, m_udp_store = 0, m_frag = 0,
        m_arp_resolve = 0, m_arp_timeout = 0, m_overflow = 0, m_crc_drop = 0,
        m_csum_drop = 0, m_frag_drop = 0, m_arb = 0, m_reasm = 0;

    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // ---- ARP: request for our address, reply, table insert ----
    send_frame(eth_frame(MAC_BCAST, H_MAC, 16'h0806, arp_pkt(16'd1, H_MAC, H_IP, '0, MY_IP)));
    wait_tx(1, 2000);
    p = eth_check(txf[0], H_MAC, 16'h0806, ok);
    chk(ok, "ARP reply framing");
    chk(slice(p, 0, 28) == arp_pkt(16'd2, MY_MAC, MY_IP, H_MAC, H_IP), "ARP reply contents");
    chk(stats.arp_entries == 8'd1, "ARP table holds the requester");
    if (ok) m_arp_reply++;

    // ---- ARP: same address from a new MAC updates the entry ----
    send_frame(eth_frame(MAC_BCAST, H_MAC2, 16'h0806, arp_pkt(16'd1, H_MAC2, H_IP, '0, MY_IP)));
    wait_tx(2, 2000);
    p = eth_check(txf[1], H_MAC2, 16'h0806, ok);
    chk(ok && get48(p, 18) == H_MAC2, "ARP reply to updated MAC");
    chk(stats.arp_entries == 8'd1, "update does not add an entry");
    if (ok) m_arp_update++;
    send_frame(eth_frame(MAC_BCAST, H_MAC, 16'h0806, arp_pkt(16'd1, H_MAC, H_IP, '0, MY_IP)));
    wait_tx(3, 2000);

    // ---- ping ----
    d = pattern(40, 3);
    q = icmp_echo(8'd8, 16'h1234, 16'd1, d);
    send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800, ip_pkt(H_IP, MY_IP, 8'd1, q, 16'h77, 16'h0000)));
    wait_tx(4, 3000);
    p = eth_check(txf[3], H_MAC, 16'h0800, ok);
    chk(ok, "echo reply framing");
    q = ip_check(p, H_IP, 8'd1, ok, fw);
    chk(ok, "echo reply IP header");
    chk(q.size() == 48 && q[0] == 8'd0 && inet_csum(q) == 16'h0000, "echo reply type and checksum");
    chk(slice(q, 4, 44) == slice(icmp_echo(8'd0, 16'h1234, 16'd1, d), 4, 44), "echo reply id, seq, data");
    if (ok) m_echo++;

    // ---- frames that must be dropped ----
    n0 = ntx;
    send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800, ip_pkt(H_IP, MY_IP, 8'd1, icmp_echo(8'd8, 1, 2, d), 16'h78, 0)), 1);
    repeat (2000) @(negedge clk);
    chk(ntx == n0 && stats.rx_bad_frames == 8'd1, "bad FCS frame dropped");
    if (stats.rx_bad_frames == 8'd1) m_crc_drop++;
    f = eth_frame(MY_MAC, H_MAC, 16'h0800, ip_pkt(H_IP, MY_IP, 8'd1, icmp_echo(8'd8, 1, 3, d), 16'h79, 0));
    f[14 + 10] = f[14 + 10] ^ 8'h01;      // break the IP header checksum, then fix the FCS
    f = eth_frame(MY_MAC, H_MAC, 16'h0800, slice(f, 14, f.size() - 18));
    send_frame(f);
    repeat (2000) @(negedge clk);
    chk(ntx == n0 && stats.ip_csum_errors == 8'd1, $sformatf("bad IP checksum dropped (%0d %0d %0d)", ntx, n0, stats.ip_csum_errors));
    if (stats.ip_csum_errors == 8'd1) m_csum_drop++;
    send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800,
               ip_pkt(H_IP, MY_IP, 8'd1, icmp_echo(8'd8, 1, 4, pattern(64, 1)), 16'h7A, 16'h2000)));
    repeat (2000) @(negedge clk);
    chk(ntx == n0 && stats.ip_frag_drops == 8'd1, "ICMP fragment dropped");
    if (stats.ip_frag_drops == 8'd1) m_frag_drop++;

    // ---- UDP reception while the PC writes the RAM ----
    d = pattern(100, 9);
    txdata = pattern(3000, 5);
    fork
      send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800,
                 ip_pkt(H_IP, MY_IP, 8'd17, udp_pkt(16'd4321, 16'd5000, d), 16'h7B, 0)));
      for (int i = 0; i < 120; i++) pc_write(16'(TXBASE + i), txdata[i]);
    join
    repeat (10) @(negedge clk);
    chk(udp_msg_valid && udp_msg_len == 16'd100 && udp_msg_src_ip == H_IP &&
        udp_msg_src_port == 16'd4321, "UDP message reported");
    begin
      int bad = 0;
      for (int i = 0; i < 100; i++) begin
        pc_read(16'(i), rb);
        if (rb != d[i]) bad++;
      end
      chk(bad == 0, "UDP data read back by the PC");
      if (bad == 0 && udp_msg_valid) m_udp_store++;
    end
    // second datagram while the first waits: dropped
    send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800,
               ip_pkt(H_IP, MY_IP, 8'd17, udp_pkt(16'd4321, 16'd5000, pattern(20, 2)), 16'h7C, 0)));
    repeat (10) @(negedge clk);
    chk(stats.udp_drops == 8'd1 && udp_msg_len == 16'd100, "UDP overflow drop");
    if (stats.udp_drops == 8'd1) m_overflow++;
    @(negedge clk); udp_msg_ack = 1'b1; @(negedge clk); udp_msg_ack = 1'b0;
    chk(!udp_msg_valid, "message acknowledged");

    // ---- UDP reception reassembled from fragments sent out of order ----
    begin
      bytes_t u;
      int bad = 0;
      d = pattern(2000, 11);
      u = udp_pkt(16'd4322, 16'd5000, d);          // 2008 bytes: 1480 + 528
      send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800,
                 ip_pkt(H_IP, MY_IP, 8'd17, slice(u, 1480, 528), 16'h7D, 16'd185)));
      repeat (10) @(negedge clk);
      chk(!udp_msg_valid, "no message from the last fragment alone");
      send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800,
                 ip_pkt(H_IP, MY_IP, 8'd17, slice(u, 0, 1480), 16'h7D, 16'h2000)));
      repeat (10) @(negedge clk);
      chk(udp_msg_valid && udp_msg_len == 16'd2000 && udp_msg_src_port == 16'd4322,
          "reassembled UDP message reported");
      for (int i = 0; i < 2000; i += 13) begin
        pc_read(16'(i), rb);
        if (rb != d[i]) bad++;
      end
      pc_read(16'd1999, rb);
      if (rb != d[1999]) bad++;
      chk(bad == 0, "reassembled data in place");
      if (bad == 0 && udp_msg_valid) m_reasm++;
      @(negedge clk); udp_msg_ack = 1'b1; @(negedge clk); udp_msg_ack = 1'b0;
    end

    // ---- PC: an unknown command byte is counted ----
    pc_byte(8'h55);
    chk(stats.pc_bad_cmds == 8'd1, "bad PC command counted");

    // ---- UDP send from RAM to a known host ----
    n0 = ntx;
    start_udp(H_IP, 16'd60);
    wait_tx(n0 + 1, 5000);
    check_udp_frame(txf[n0 % 64], H_MAC, H_IP, slice(txdata, 0, 60), "UDP send");

    // ---- fragmented UDP send: 3008 bytes in 1480 + 1480 + 48 ----
    for (int i = 120; i < 3000; i++) pc_write(16'(TXBASE + i), txdata[i]);
    n0 = ntx;
    t_start = $realtime;
    start_udp(H_IP, 16'd3000);
    wait_tx(n0 + 3, 20000);
    // UDP data rate with a 25 MHz clock (40 ns period); the router is
    // specified for 10-15 Mb/s
    mbps = 3000.0 * 8.0 / (($realtime - t_start) / 40.0 * 40e-9) / 1e6;
    $display("UDP send rate: %0.1f Mb/s", mbps);
    chk(mbps >= 15.0, "UDP send rate at least 15 Mb/s");
    begin
      bytes_t all;
      int offs[3] = '{0, 1480, 2960};
      int lens[3] = '{1480, 1480, 48};
      bit fok = 1;
      for (int k = 0; k < 3; k++) begin
        p = eth_check(txf[(n0 + k) % 64], H_MAC, 16'h0800, ok);
        q = ip_check(p, H_IP, 8'd17, ok, fw);
        fok &= ok && (q.size() == lens[k]) && (fw[12:0] == 13'(offs[k] / 8)) && (fw[13] == (k < 2));
        foreach (q[i]) all.push_back(q[i]);
      end
      chk(fok, "three fragments with offsets and MF");
      chk(get16(all, 4) == 16'd3008 && slice(all, 8, 3000) == txdata, "reassembled UDP data");
      if (fok) m_frag++;
    end

    // ---- UDP send to an unknown host: ARP request, answer, datagram ----
    n0 = ntx;
    start_udp(H_IP3, 16'd20);
    wait_tx(n0 + 1, 3000);
    p = eth_check(txf[n0 % 64], MAC_BCAST, 16'h0806, ok);
    chk(ok && slice(p, 0, 28) == arp_pkt(16'd1, MY_MAC, MY_IP, '0, H_IP3), "ARP request broadcast");
    send_frame(eth_frame(MY_MAC, H_MAC3, 16'h0806, arp_pkt(16'd2, H_MAC3, H_IP3, MY_MAC, MY_IP)));
    wait_tx(n0 + 2, 3000);
    check_udp_frame(txf[(n0 + 1) % 64], H_MAC3, H_IP3, slice(txdata, 0, 20), "UDP after ARP");
    chk(stats.arp_entries == 8'd2, "ARP reply inserted");
    if (ok) m_arp_resolve++;

    // ---- UDP send to a host that never answers: timeout, drop ----
    n0 = ntx;
    start_udp(H_IP4, 16'd20);
    wait_tx(n0 + 1, 3000);
    begin
      int c = 0;
      while (!udp_done && c < 1_100_000) begin @(negedge clk); c++; end
      chk(udp_done && stats.arp_drops == 8'd1 && c > 990_000, "unanswered ARP: datagram dropped after the wait");
      if (stats.arp_drops == 8'd1) m_arp_timeout++;
    end
    repeat (200) @(negedge clk);
    chk(ntx == n0 + 1, "nothing sent for the dropped datagram");

    // ---- ping and UDP send at once: both handed over ----
    n0 = ntx;
    d = pattern(30, 11);
    fork
      send_frame(eth_frame(MY_MAC, H_MAC, 16'h0800,
                 ip_pkt(H_IP, MY_IP, 8'd1, icmp_echo(8'd8, 16'h42, 16'd9, d), 16'h7D, 0)));
      begin repeat (150) @(negedge clk); start_udp(H_IP, 16'd300); end
    join
    wait_tx(n0 + 2, 5000);
    begin
      int seen_udp = 0, seen_icmp = 0;
      for (int k = 0; k < 2; k++) begin
        p = eth_check(txf[(n0 + k) % 64], H_MAC, 16'h0800, ok);
        if (ok && p[9] == 8'd17) seen_udp++;
        if (ok && p[9] == 8'd1) seen_icmp++;
      end
      chk(seen_udp == 1 && seen_icmp == 1, "both UDP and echo reply sent");
      if (seen_udp == 1 && seen_icmp == 1 && m_arb_both > 0) m_arb++;
    end

    chk(stats.tx_underruns == 8'd0, "no transmit underrun");
    chk(stats.icmp_echos == 8'd2, "two echo replies counted");

    $display("mechanisms: arp_reply=%0d arp_update=%0d echo=%0d crc_drop=%0d csum_drop=%0d frag_drop=%0d",
             m_arp_reply, m_arp_update, m_echo, m_crc_drop, m_csum_drop, m_frag_drop);
    $display("mechanisms: udp_store=%0d overflow=%0d fragmentation=%0d arp_resolve=%0d arp_timeout=%0d",
             m_udp_store, m_overflow, m_frag, m_arp_resolve, m_arp_timeout);
    $display("mechanisms: reassembly=%0d", m_reasm);
    $display("mechanisms: mux_contention=%0d arbitration=%0d (cycles a source waited: %0d)",
             m_mux_contention, m_arb, m_arb_both);
    chk(m_arp_reply > 0, "mechanism ARP reply");
    chk(m_arp_update > 0, "mechanism ARP update");
    chk(m_echo > 0, "mechanism echo");
    chk(m_crc_drop > 0, "mechanism FCS drop");
    chk(m_csum_drop > 0, "mechanism IP checksum drop");
    chk(m_frag_drop > 0, "mechanism fragment drop");
    chk(m_reasm > 0, "mechanism reassembly");
    chk(m_udp_store > 0, "mechanism UDP store");
    chk(m_overflow > 0, "mechanism UDP overflow");
    chk(m_frag > 0, "mechanism fragmentation");
    chk(m_arp_resolve > 0, "mechanism ARP resolve");
    chk(m_arp_timeout > 0, "mechanism ARP timeout");
    chk(m_mux_contention > 0, "mechanism RAM contention");
    chk(m_arb > 0, "mechanism hand-over arbitration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
