// tb_udp_rx - feeds UDP datagrams to the UDP receiver and checks, against a
// model RAM filled from its write port, that the data of datagrams for the
// listening port lands at RX_BASE upward, that the message report carries
// length, address and port, that other ports are ignored, that a datagram
// completing while a message waits is dropped and counted, that a datagram
// never completed is not reported, that RX_MAX limits what is stored, that
// pieces of a datagram delivered out of order land in place, and that a
// datagram whose data could not all be stored is dropped.
module tb_udp_rx;
  import tb_net_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sel = 0, in_sof = 0, in_new = 0, in_done = 0;
  logic [15:0] in_pos = 0, in_tot = 0;
  logic [7:0] in_data = 0, wr_data, n_drop;
  logic [31:0] in_src = 0, msg_src_ip;
  logic wr_en, msg_valid, msg_ack = 0;
  logic [9:0] wr_addr;
  logic [15:0] msg_len, msg_src_port;

  udp_rx #(.UDP_PORT(16'd5000), .AW(10), .RX_BASE(10'h100), .RX_MAX(64)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] ram [1024];
  int nwr = 0;
  always @(negedge clk) if (wr_en) begin ram[wr_addr] = wr_data; nwr++; end

  // deliver bytes [from, from+n) of datagram u as one piece; first marks the
  // start of a new datagram, done reports it complete afterwards
  task automatic piece(input bytes_t u, input int from, input int n, input bit first, input bit done);
    in_src = 32'hC0A80105; in_sel = 1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = u[from + i]; in_pos = 16'(from + i);
      in_sof = (i == 0); in_new = first && (i == 0);
      @(negedge clk);
      in_valid = 0; in_sof = 0; in_new = 0;
    end
    @(negedge clk); in_done = done; in_tot = 16'(u.size());
    @(negedge clk); in_done = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic feed(input bytes_t u, input bit ok);
    piece(u, 0, u.size(), 1, ok);
  endtask

  function automatic bit ram_has(input int base, input bytes_t d);
    foreach (d[i]) if (ram[base + i] != d[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    d = pattern(40, 2);
    feed(udp_pkt(16'd1234, 16'd5000, d), 1);
    chk(msg_valid && msg_len == 16'd40 && msg_src_ip == 32'hC0A80105 && msg_src_port == 16'd1234, "message reported");
    chk(nwr == 40 && ram_has(32'h100, d), "data stored at RX_BASE");
    feed(udp_pkt(16'd1234, 16'd5000, pattern(10, 3)), 1);
    chk(n_drop == 8'd1 && nwr == 40 && msg_len == 16'd40, "datagram dropped while a message waits");
    @(negedge clk); msg_ack = 1; @(negedge clk); msg_ack = 0;
    chk(!msg_valid, "acknowledged");
    feed(udp_pkt(16'd1234, 16'd5001, pattern(10, 3)), 1);
    chk(!msg_valid, "other port not reported");
    feed(udp_pkt(16'd1234, 16'd5000, pattern(10, 3)), 0);
    chk(!msg_valid, "bad frame not reported");
    d = pattern(100, 7);
    feed(udp_pkt(16'd999, 16'd5000, d), 1);
    chk(msg_valid && msg_len == 16'd64 && msg_src_port == 16'd999 && ram_has(32'h100, slice(d, 0, 64)),
        "stored length limited by RX_MAX");
    @(negedge clk); msg_ack = 1; @(negedge clk); msg_ack = 0;
    // out of order: data tail, then header with the first data, then middle
    begin
      bytes_t u;
      d = pattern(50, 9);
      u = udp_pkt(16'd77, 16'd5000, d);
      piece(u, 40, 18, 1, 0);
      piece(u, 0, 24, 0, 0);
      chk(!msg_valid, "not reported before complete");
      piece(u, 24, 16, 0, 1);
      chk(msg_valid && msg_len == 16'd50 && msg_src_port == 16'd77 && ram_has(32'h100, d),
          "out-of-order pieces placed by position");
      // a second datagram whose first piece arrives while the message waits
      u = udp_pkt(16'd78, 16'd5000, pattern(20, 4));
      piece(u, 0, 16, 1, 0);
      @(negedge clk); msg_ack = 1; @(negedge clk); msg_ack = 0;
      piece(u, 16, 12, 0, 1);
      chk(!msg_valid && n_drop == 8'd2, "datagram with skipped bytes dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
