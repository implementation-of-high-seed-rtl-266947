// tb_ip_rx - feeds IPv4 datagrams (as the Ethernet receiver delivers them,
// padding and FCS bytes included) to the IP receiver and checks the payload
// stream and its markers against the reference packets: ICMP and UDP
// datagrams to our address, a broadcast, a header with options, a bad
// header checksum, a foreign destination, an unknown protocol and a
// datagram from a frame that ends bad. A UDP datagram sent as three
// fragments out of order must come out with every byte at its position and
// one completion with the total length; an ICMP fragment and an abandoned
// reassembly must be counted.
module tb_ip_rx;
  import tb_net_pkg::*;
  localparam logic [31:0] MY_IP = 32'hC0A8_0102;
  localparam logic [31:0] H_IP  = 32'hC0A8_0105;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_eof = 0, in_ok = 0;
  logic [7:0] in_data = 0;
  logic pl_valid, pl_sof, pl_last, pl_end, pl_ok, sel_icmp, sel_udp;
  logic [7:0] pl_data, n_frag, n_csum_err;
  logic [31:0] pl_src;
  logic [15:0] pl_len, pl_pos, pl_tot;
  logic pl_new, pl_done;

  ip_rx #(.MY_IP(MY_IP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bytes_t got;
  int n_sof = 0, n_last = 0, n_end = 0, e_ok = 0, e_icmp = 0, e_udp = 0;
  int n_done = 0, n_new = 0, pos_bad = 0, last_tot = 0;
  logic [7:0] asm [2048];
  always @(negedge clk) begin
    if (pl_done) begin n_done++; last_tot = pl_tot; end
    if (pl_valid) begin
      if (sel_udp) begin
        if (pl_pos >= 16'd2048) pos_bad++;
        else asm[pl_pos] = pl_data;
        n_new += (pl_sof && pl_new);
      end
      got.push_back(pl_data);
      n_sof += pl_sof;
      n_last += pl_last;
    end
    if (pl_end) begin n_end++; e_ok = pl_ok; e_icmp = sel_icmp; e_udp = sel_udp; end
  end

  task automatic feed(input bytes_t p, input bit ok);
    while (p.size() < 46) p.push_back(8'h00);
    repeat (4) p.push_back(8'hEE);
    got = {}; n_sof = 0; n_last = 0;
    foreach (p[i]) begin
      @(negedge clk);
      in_valid = 1; in_data = p[i]; in_sof = (i == 0);
      @(negedge clk);
      in_valid = 0; in_sof = 0;
    end
    @(negedge clk); in_eof = 1; in_ok = ok;
    @(negedge clk); in_eof = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t d, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    d = pattern(10, 1);     // shorter than the Ethernet minimum: padding must be cut
    feed(ip_pkt(H_IP, MY_IP, 8'd1, d, 1, 0), 1);
    chk(got == d && n_sof == 1 && n_last == 1, "ICMP payload cut at total length");
    chk(n_end == 1 && e_ok && e_icmp && !e_udp && pl_src == H_IP && pl_len == 16'd10, "ICMP markers");
    d = pattern(200, 2);
    feed(ip_pkt(H_IP, MY_IP, 8'd17, d, 2, 16'h4000), 1);   // DF set is fine
    chk(got == d && n_end == 2 && e_ok && e_udp && !e_icmp && pl_len == 16'd200, "UDP payload");
    feed(ip_pkt(H_IP, 32'hFFFF_FFFF, 8'd17, d, 3, 0), 1);
    chk(got == d && n_end == 3 && e_ok, "broadcast accepted");
    // header with one option word
    p = ip_pkt(H_IP, MY_IP, 8'd17, d, 4, 0);
    begin
      bytes_t h;
      logic [15:0] c;
      h = slice(p, 0, 20);
      h[0] = 8'h46;
      {h[2], h[3]} = 16'(24 + d.size());
      h[10] = 0; h[11] = 0;
      repeat (4) h.push_back(8'h01);
      c = inet_csum(h);
      h[10] = c[15:8]; h[11] = c[7:0];
      foreach (d[i]) h.push_back(d[i]);
      feed(h, 1);
      chk(got == d && n_end == 4 && e_ok, $sformatf("options skipped %0d %0d %0d %0d %0d", got.size(), n_end, e_ok, n_csum_err, n_frag));
    end
    p = ip_pkt(H_IP, MY_IP, 8'd17, d, 5, 0);
    p[8] = p[8] - 1;
    feed(p, 1);
    chk(got.size() == 0 && n_end == 4 && n_csum_err == 8'd1, "bad checksum dropped and counted");
    // a 200-byte UDP payload as fragments of 80, 80 and 40 bytes, sent
    // last, first, middle
    chk(n_done == 3, "each whole UDP datagram completes once");
    n_new = 0;
    feed(ip_pkt(H_IP, MY_IP, 8'd17, slice(d, 160, 40), 6, 16'h0014), 1);
    chk(n_done == 3 && n_new == 1 && got == slice(d, 160, 40), "last fragment passed on, datagram not yet done");
    feed(ip_pkt(H_IP, MY_IP, 8'd17, slice(d, 0, 80), 6, 16'h2000), 1);
    chk(n_done == 3 && n_new == 1, "first fragment joins the context");
    feed(ip_pkt(H_IP, MY_IP, 8'd17, slice(d, 80, 80), 6, 16'h200A), 1);
    begin
      bit same;
      same = 1;
      foreach (d[i]) if (asm[i] != d[i]) same = 0;
      chk(n_done == 4 && last_tot == 200 && same && pos_bad == 0 && n_new == 1,
          $sformatf("fragments reassembled in place (done %0d tot %0d)", n_done, last_tot));
    end
    chk(n_frag == 8'd0, "no drop counted for a completed reassembly");
    // a fragment that never completes, then a new datagram: abandoned
    feed(ip_pkt(H_IP, MY_IP, 8'd17, slice(d, 0, 80), 10, 16'h2000), 1);
    feed(ip_pkt(H_IP, MY_IP, 8'd17, d, 11, 0), 1);
    chk(n_frag == 8'd1 && n_done == 5 && last_tot == 200, "unfinished reassembly abandoned and counted");
    // a fragment from a bad frame does not complete its datagram
    feed(ip_pkt(H_IP, MY_IP, 8'd17, slice(d, 0, 160), 12, 16'h2000), 1);
    feed(ip_pkt(H_IP, MY_IP, 8'd17, slice(d, 160, 40), 12, 16'h0014), 0);
    chk(n_done == 5, "bad fragment not counted as received");
    feed(ip_pkt(H_IP, MY_IP, 8'd1, slice(d, 0, 80), 13, 16'h2000), 1);
    chk(got.size() == 0 && n_frag == 8'd2, "ICMP fragment dropped, UDP context kept");
    feed(ip_pkt(H_IP, 32'hC0A80199, 8'd17, d, 7, 0), 1);
    chk(got.size() == 0 && n_done == 5, "foreign destination ignored");
    feed(ip_pkt(H_IP, MY_IP, 8'd6, d, 8, 0), 1);
    chk(got.size() == 0 && n_done == 5, "TCP ignored");
    feed(ip_pkt(H_IP, MY_IP, 8'd17, d, 9, 0), 0);
    chk(!e_ok && n_done == 5 && n_frag == 8'd3, "bad frame reported not ok");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
