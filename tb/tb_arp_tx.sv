// tb_arp_tx - checks the ARP sender with a model Ethernet sender (busy
// while it pulls a frame and for a gap after it), a model ARP table and a
// model IP sender: an ARP reply, a datagram to a cached address, a datagram
// that needs an ARP request and then goes out, one whose request is never
// answered (dropped after ARP_WAIT), reply-before-datagram priority, and no
// frame started while the Ethernet sender is busy.
module tb_arp_tx;
  import hsr_pkg::*;
  import tb_net_pkg::*;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_01;
  localparam logic [31:0] MY_IP  = 32'hC0A8_0102;

  logic clk = 0, rst_n = 0;
  logic reply_req = 0, reply_ack;
  logic [47:0] reply_mac = 0;
  logic [31:0] reply_ip = 0;
  logic ip_req = 0, ip_grant, ip_fail, ip_valid, ip_last, ip_ready;
  logic [31:0] ip_dst = 0, lk_ip;
  logic [7:0] ip_data, pl_data;
  logic lk_hit;
  logic [47:0] lk_mac, eth_dst;
  logic eth_req, eth_busy = 0, pl_valid, pl_last, pl_ready = 0, arp_req_sent, arp_reply_sent;
  frame_type_t eth_type;

  arp_tx #(.MY_MAC(MY_MAC), .MY_IP(MY_IP), .ARP_WAIT(50)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model table
  logic [31:0] t_ip = 0;
  logic [47:0] t_mac = 0;
  logic t_valid = 0;
  assign lk_hit = t_valid && (lk_ip == t_ip);
  assign lk_mac = t_mac;

  // model IP sender stream
  bytes_t ipd;
  int ii = 0;
  assign ip_valid = ii < ipd.size();
  assign ip_data  = ip_valid ? ipd[ii] : 8'h00;
  assign ip_last  = (ii == ipd.size() - 1);
  always @(posedge clk) if (ip_ready && ip_valid) ii <= ii + 1;

  // model Ethernet sender
  bytes_t frames[8];
  frame_type_t ftype[8];
  logic [47:0] fdst[8];
  int nf = 0, req_while_busy = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (eth_req) begin
        bytes_t cur;
        bit done = 0;
        cur = {};
        done = 0;
        ftype[nf] = eth_type; fdst[nf] = eth_dst;
        eth_busy = 1;
        repeat (10) @(negedge clk);
        while (!done) begin
          pl_ready = 1;
          if (pl_valid) begin cur.push_back(pl_data); done = pl_last; end
          @(negedge clk);
          pl_ready = 0;
          @(negedge clk);
        end
        frames[nf] = cur; nf++;
        repeat (30) @(negedge clk);
        eth_busy = 0;
      end
    end
  end
  logic busy_q = 0;
  always @(posedge clk) busy_q <= eth_busy;
  always @(negedge clk) if (eth_req && busy_q) req_while_busy++;

  task automatic ip_send(input logic [31:0] dst, input int n, output int res);
    int c = 0;
    ipd = pattern(n, n); ii = 0;
    @(negedge clk);
    ip_req = 1; ip_dst = dst;
    res = 0;
    while (res == 0 && c < 5000) begin
      @(negedge clk); c++;
      if (ip_grant) res = 1;
      if (ip_fail) res = 2;
    end
    ip_req = 0;
    while (eth_busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int res;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ARP reply
    @(negedge clk);
    reply_req = 1; reply_mac = 48'h0211_2233_4455; reply_ip = 32'hC0A80105;
    while (!reply_ack) @(negedge clk);
    @(negedge clk); reply_req = 0;
    while (eth_busy || nf < 1) @(negedge clk);
    chk(ftype[0] == FT_ARP && fdst[0] == 48'h0211_2233_4455, "reply frame type and destination");
    chk(frames[0] == arp_pkt(2, MY_MAC, MY_IP, 48'h0211_2233_4455, 32'hC0A80105), "reply contents");
    // cached destination
    t_valid = 1; t_ip = 32'hC0A80105; t_mac = 48'h0211_2233_4455;
    ip_send(32'hC0A80105, 40, res);
    chk(res == 1 && nf == 2, "datagram granted");
    chk(ftype[1] == FT_IP && fdst[1] == 48'h0211_2233_4455 && frames[1] == pattern(40, 40), "datagram passed through");
    // unknown destination that gets answered
    fork
      ip_send(32'hC0A80107, 30, res);
      begin
        while (nf < 3) @(negedge clk);
        t_ip = 32'hC0A80107; t_mac = 48'h0277_7777_7777;
      end
    join
    chk(ftype[2] == FT_ARP && fdst[2] == MAC_BCAST && frames[2] == arp_pkt(1, MY_MAC, MY_IP, 0, 32'hC0A80107),
        "ARP request broadcast");
    while (nf < 4) @(negedge clk);
    chk(res == 1 && ftype[3] == FT_IP && fdst[3] == 48'h0277_7777_7777 && frames[3] == pattern(30, 30),
        "datagram sent after the answer");
    // never answered
    ip_send(32'hC0A80109, 30, res);
    repeat (100) @(negedge clk);
    chk(res == 2 && nf == 5 && ftype[4] == FT_ARP, "unanswered: one request, then dropped");
    // priority: reply before datagram
    @(negedge clk);
    reply_req = 1; reply_mac = 48'h0299_9999_9999; reply_ip = 32'hC0A80108;
    fork
      ip_send(32'hC0A80107, 20, res);
      begin while (!reply_ack) @(negedge clk); @(negedge clk); reply_req = 0; end
    join
    while (nf < 7) @(negedge clk);
    chk(ftype[5] == FT_ARP && ftype[6] == FT_IP && res == 1, "reply goes before datagram");
    chk(req_while_busy == 0, "no frame started while the sender was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
