// tb_udp_tx - starts UDP sends from a model RAM (one-clock read latency)
// and pulls the bytes as the Ethernet sender would, one every two clocks,
// with a pull in the very first clock the data is offered. Checks the
// request (destination, length), the UDP header and the data against the
// RAM contents, that every pull finds a byte ready, and done.
module tb_udp_tx;
  import tb_net_pkg::*;

  logic clk = 0, rst_n = 0;
  logic send = 0, busy, done, req, req_ack = 0, out_valid, out_last, out_ready = 0, rd_en;
  logic [31:0] dst_ip = 0, req_dst;
  logic [15:0] dst_port = 0, src_port = 0, len = 0, req_len;
  logic [9:0] base = 0, rd_addr;
  logic [7:0] out_data, rd_data;

  udp_tx #(.AW(10)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] ram [1024];
  always @(posedge clk) if (rd_en) rd_data <= ram[rd_addr];

  task automatic run(input int n, input int b, output bytes_t r, output int empty_pulls);
    bit fin;
    fin = 0; r = {}; empty_pulls = 0;
    @(negedge clk);
    send = 1; dst_ip = 32'hC0A80105; dst_port = 16'd7000; src_port = 16'd5000; len = 16'(n); base = 10'(b);
    @(negedge clk);
    send = 0;
    while (!req) @(negedge clk);
    chk(req_dst == 32'hC0A80105 && req_len == 16'(n + 8), "request fields");
    repeat (5) @(negedge clk);
    req_ack = 1; @(negedge clk); req_ack = 0;
    while (!fin) begin
      out_ready = 1;
      if (out_valid) begin r.push_back(out_data); fin = out_last; end
      else empty_pulls++;
      @(negedge clk);
      out_ready = 0;
      @(negedge clk);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t r, d;
    int e;
    for (int i = 0; i < 1024; i++) ram[i] = 8'(i * 13 + 5);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(50, 100, r, e);
    d = {};
    for (int i = 0; i < 50; i++) d.push_back(ram[100 + i]);
    chk(r == udp_pkt(16'd5000, 16'd7000, d), "datagram matches RAM contents");
    chk(e == 0, "a byte ready at every pull");
    chk(!busy, "idle after the datagram");
    run(1, 1023, r, e);
    chk(r == udp_pkt(16'd5000, 16'd7000, '{ram[1023]}), "one-byte datagram from the last address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
