// tb_ip_tx - sends datagrams through the IP sender with MTU 68 (fragments
// of at most 48 payload bytes) and a model ARP sender that grants each
// fragment and pulls its bytes. Checks every header field and checksum
// against a reference header, the fragment offsets and flags, the
// reassembled payload, and the drain of the payload when the ARP sender
// reports failure.
module tb_ip_tx;
  import tb_net_pkg::*;
  localparam logic [31:0] MY_IP = 32'hC0A8_0102;

  logic clk = 0, rst_n = 0;
  logic req = 0, req_ack, busy, done;
  logic [31:0] req_dst = 0, ip_dst;
  logic [7:0] req_proto = 0, up_data, dn_data, n_frags;
  logic [15:0] req_len = 0;
  logic up_valid, up_ready, ip_req, ip_grant = 0, ip_fail = 0, dn_valid, dn_last, dn_ready = 0;

  ip_tx #(.MY_IP(MY_IP), .MTU(68)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // payload source
  bytes_t src;
  int si = 0;
  assign up_valid = si < src.size();
  assign up_data  = up_valid ? src[si] : 8'h00;
  always @(posedge clk) if (up_ready && up_valid) si <= si + 1;

  // model ARP sender: grants or fails each request, pulls every other clock
  bytes_t frags[8];
  int nfr = 0, fail_mode = 0, nfail = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (ip_req) begin
        repeat (3) @(negedge clk);
        if (fail_mode) begin
          ip_fail = 1; @(negedge clk); ip_fail = 0; nfail++;
        end else begin
          bytes_t cur;
          bit fin;
          fin = 0;
          cur = {};
          ip_grant = 1; @(negedge clk); ip_grant = 0;
          while (!fin) begin
            dn_ready = 1;
            if (dn_valid) begin cur.push_back(dn_data); fin = dn_last; end
            @(negedge clk);
            dn_ready = 0;
            @(negedge clk);
          end
          frags[nfr] = cur; nfr++;
        end
      end
    end
  end

  task automatic send(input int n, input logic [31:0] dst);
    src = pattern(n, 5); si = 0;
    @(negedge clk);
    req = 1; req_dst = dst; req_proto = 8'd17; req_len = 16'(n);
    while (!req_ack) @(negedge clk);
    req = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // single datagram
    send(30, 32'hC0A80105);
    chk(nfr == 1 && frags[0] == ip_pkt(MY_IP, 32'hC0A80105, 8'd17, pattern(30, 5), 16'd1, 16'h0000),
        "unfragmented datagram matches reference");
    chk(ip_dst == 32'hC0A80105, "next hop is the destination");
    // 100 bytes -> 48 + 48 + 4
    nfr = 0;
    send(100, 32'hC0A80106);
    chk(nfr == 3, "three fragments");
    for (int k = 0; k < 3; k++) begin
      int n;
      logic [15:0] fw;
      n  = (k < 2) ? 48 : 4;
      fw = {2'b00, (k < 2), 13'(k * 6)};
      chk(frags[k] == ip_pkt(MY_IP, 32'hC0A80106, 8'd17, slice(pattern(100, 5), 48 * k, n), 16'd2, fw),
          $sformatf("fragment %0d header, offset, flag and data", k));
    end
    chk(n_frags == 8'd4, "fragment counter");
    chk(si == 100, "whole payload pulled");
    // ARP failure: payload drained, nothing sent
    nfr = 0; fail_mode = 1;
    send(70, 32'hC0A80109);
    chk(nfr == 0 && nfail == 1 && si == 70, "failed datagram drained");
    chk(!busy, "idle after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
