// tb_arp_rx - feeds ARP packets to the ARP receiver as byte streams (one
// byte per two clocks, trailing padding included) and checks the table
// updates and reply requests: a request for our address, a reply for our
// address (update only), a request for another address (ignored), a packet
// from a bad frame (ignored), a request while a reply is pending, and the
// request/acknowledge handshake.
module tb_arp_rx;
  import tb_net_pkg::*;
  localparam logic [31:0] MY_IP = 32'hC0A8_0102;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_eof = 0, in_ok = 0;
  logic [7:0] in_data = 0;
  logic tbl_upd, reply_req, reply_ack = 0;
  logic [31:0] tbl_ip, reply_ip;
  logic [47:0] tbl_mac, reply_mac;

  arp_rx #(.MY_IP(MY_IP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_upd = 0;
  logic [31:0] l_ip;
  logic [47:0] l_mac;
  always @(negedge clk) if (tbl_upd) begin n_upd++; l_ip = tbl_ip; l_mac = tbl_mac; end

  task automatic feed(input bytes_t p, input bit ok);
    for (int i = 0; i < 18; i++) p.push_back(8'h00);   // padding and FCS
    foreach (p[i]) begin
      @(negedge clk);
      in_valid = 1; in_data = p[i]; in_sof = (i == 0);
      @(negedge clk);
      in_valid = 0; in_sof = 0;
    end
    @(negedge clk);
    in_eof = 1; in_ok = ok;
    @(negedge clk);
    in_eof = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    feed(arp_pkt(1, 48'h0211_2233_4455, 32'hC0A80105, 0, MY_IP), 1);
    chk(n_upd == 1 && l_ip == 32'hC0A80105 && l_mac == 48'h0211_2233_4455, "request updates table");
    chk(reply_req && reply_ip == 32'hC0A80105 && reply_mac == 48'h0211_2233_4455, "reply requested");
    // another request while pending: table only
    feed(arp_pkt(1, 48'h02AA_BBCC_DDEE, 32'hC0A80106, 0, MY_IP), 1);
    chk(n_upd == 2 && l_ip == 32'hC0A80106, "second request updates table");
    chk(reply_req && reply_ip == 32'hC0A80105, "pending reply kept");
    @(negedge clk); reply_ack = 1; @(negedge clk); reply_ack = 0;
    chk(!reply_req, "acknowledge clears the request");
    // reply addressed to us: update only
    feed(arp_pkt(2, 48'h0201_0101_0101, 32'hC0A80107, 48'h02_00_00_00_00_01, MY_IP), 1);
    chk(n_upd == 3 && l_ip == 32'hC0A80107 && l_mac == 48'h0201_0101_0101 && !reply_req, "reply updates only");
    // request for someone else
    feed(arp_pkt(1, 48'h0202_0202_0202, 32'hC0A80108, 0, 32'hC0A80199), 1);
    chk(n_upd == 3 && !reply_req, "other target ignored");
    // bad frame
    feed(arp_pkt(1, 48'h0202_0202_0202, 32'hC0A80108, 0, MY_IP), 0);
    chk(n_upd == 3 && !reply_req, "bad frame ignored");
    // wrong protocol type
    begin
      bytes_t p;
      p = arp_pkt(1, 48'h0202_0202_0202, 32'hC0A80108, 0, MY_IP);
      p[2] = 8'h86;
      feed(p, 1);
      chk(n_upd == 3 && !reply_req, "non-IPv4 ARP ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
