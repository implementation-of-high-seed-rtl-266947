// tb_hdlc - two model sources offer datagrams to the hand-over unit and a
// model IP sender acknowledges, pulls the announced number of bytes and
// reports done. Checks that requests are forwarded with the right fields,
// that the acknowledge and the byte stream reach only the granted source,
// that a waiting source is served after the current one, and that with
// both always requesting the grants alternate.
module tb_hdlc;
  logic clk = 0, rst_n = 0;
  logic [1:0] src_req = 0, src_ack, src_valid, src_ready;
  logic [1:0][31:0] src_dst;
  logic [1:0][7:0] src_proto, src_data;
  logic [1:0][15:0] src_len;
  logic ip_req, ip_ack = 0, ip_done = 0, up_valid, up_ready = 0;
  logic [31:0] ip_dst;
  logic [7:0] ip_proto, up_data;
  logic [15:0] ip_len;
  logic [1:0][7:0] grants;

  hdlc #(.N(2)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sources: source s sends bytes {s, index}
  int idx [2] = '{0, 0};
  int acks [2] = '{0, 0};
  assign src_dst   = {32'hB, 32'hA};
  assign src_proto = {8'd17, 8'd1};
  assign src_len   = {16'd6, 16'd4};
  always_comb for (int s = 0; s < 2; s++) begin
    src_valid[s] = 1'b1;
    src_data[s]  = {4'(s), 4'(idx[s])};
  end
  always @(posedge clk) for (int s = 0; s < 2; s++) begin
    if (src_ready[s]) idx[s] <= idx[s] + 1;
    if (src_ack[s]) acks[s] <= acks[s] + 1;
  end

  // model IP sender; records who was served
  int order[$];
  int bad_stream = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (ip_req) begin
        int n, who;
        who = (ip_dst == 32'hA) ? 0 : 1;
        if (ip_proto != ((who == 0) ? 8'd1 : 8'd17)) bad_stream++;
        n = ip_len;
        order.push_back(who);
        ip_ack = 1; @(negedge clk); ip_ack = 0;
        for (int i = 0; i < n; i++) begin
          up_ready = 1;
          if (!up_valid || up_data[7:4] != 4'(who)) bad_stream++;
          @(negedge clk);
          up_ready = 0;
          @(negedge clk);
        end
        ip_done = 1; @(negedge clk); ip_done = 0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // source 1 alone
    @(negedge clk); src_req[1] = 1;
    while (acks[1] == 0) @(negedge clk);
    src_req[1] = 0;
    // source 0 requests while source 1 is being served
    repeat (3) @(negedge clk); src_req[0] = 1;
    while (acks[0] == 0) @(negedge clk);
    src_req[0] = 0;
    repeat (40) @(negedge clk);
    chk(order.size() == 2 && order[0] == 1 && order[1] == 0, "waiting source served next");
    chk(idx[0] == 4 && idx[1] == 6, "each source pulled for its own length");
    chk(acks[0] == 1 && acks[1] == 1, "one acknowledge per source");
    // both always requesting: alternate
    src_req = 2'b11;
    repeat (200) @(negedge clk);
    src_req = 2'b00;
    repeat (60) @(negedge clk);
    begin
      int alt = 1;
      for (int i = 3; i < order.size(); i++) if (order[i] == order[i-1]) alt = 0;
      chk(order.size() >= 6 && alt == 1, "round-robin alternation");
    end
    chk(bad_stream == 0, "stream and fields from the granted source only");
    chk(grants[0] + grants[1] == 8'(order.size()), "grant counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
