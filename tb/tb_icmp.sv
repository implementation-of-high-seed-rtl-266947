// tb_icmp - feeds ICMP messages to the echo responder as the IP receiver
// delivers them and checks the reply request and the reply bytes against a
// reference echo reply (type 0, recomputed checksum, identifier, sequence
// and data echoed), for an even and an odd data length. Messages that must
// be ignored: a bad checksum, a non-echo type, a bad frame, one longer than
// the buffer, and a request arriving while a reply is pending.
module tb_icmp;
  import tb_net_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sel = 0, in_sof = 0, in_end = 0, in_ok = 0;
  logic [7:0] in_data = 0, out_data, n_echo;
  logic [31:0] in_src = 0, req_dst;
  logic [15:0] in_len = 0, req_len;
  logic req, req_ack = 0, out_valid, out_last, out_ready = 0;

  icmp #(.BUF_BYTES(64)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic feed(input bytes_t m, input bit ok, input logic [31:0] src);
    in_src = src; in_len = 16'(m.size()); in_sel = 1;
    foreach (m[i]) begin
      @(negedge clk);
      in_valid = 1; in_data = m[i]; in_sof = (i == 0);
      @(negedge clk);
      in_valid = 0; in_sof = 0;
    end
    repeat (3) @(negedge clk);
    in_end = 1; in_ok = ok;
    @(negedge clk);
    in_end = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic take(output bytes_t r);
    bit fin;
    fin = 0;
    r = {};
    @(negedge clk); req_ack = 1; @(negedge clk); req_ack = 0;
    while (!fin) begin
      out_ready = 1;
      if (out_valid) begin r.push_back(out_data); fin = out_last; end
      @(negedge clk);
      out_ready = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t r, d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    d = pattern(32, 4);
    feed(icmp_echo(8, 16'hABCD, 16'd7, d), 1, 32'hC0A80105);
    chk(req && req_dst == 32'hC0A80105 && req_len == 16'd40, "reply requested");
    // a second request while pending is ignored
    feed(icmp_echo(8, 16'h1111, 16'd8, d), 1, 32'hC0A80106);
    chk(req && req_dst == 32'hC0A80105, "pending reply kept");
    take(r);
    chk(r == icmp_echo(0, 16'hABCD, 16'd7, d), "even-length reply matches reference");
    chk(!req && n_echo == 8'd1, "reply done");
    d = pattern(13, 6);
    feed(icmp_echo(8, 16'h0102, 16'd300, d), 1, 32'hC0A80107);
    chk(req && req_len == 16'd21, "odd-length request");
    take(r);
    chk(r == icmp_echo(0, 16'h0102, 16'd300, d), "odd-length reply matches reference");
    r = icmp_echo(8, 16'h0102, 16'd301, d);
    r[6] = r[6] ^ 8'h40;
    feed(r, 1, 32'hC0A80107);
    chk(!req, "bad checksum ignored");
    feed(icmp_echo(13, 16'h0102, 16'd302, d), 1, 32'hC0A80107);
    chk(!req, "timestamp request ignored");
    feed(icmp_echo(8, 16'h0102, 16'd303, d), 0, 32'hC0A80107);
    chk(!req, "bad frame ignored");
    feed(icmp_echo(8, 16'h0102, 16'd304, pattern(60, 1)), 1, 32'hC0A80107);
    chk(!req, "message longer than the buffer ignored");
    chk(n_echo == 8'd2, "two replies counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
