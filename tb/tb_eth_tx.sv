// tb_eth_tx - asks the Ethernet sender for frames and decodes its MII
// output: preamble and SFD, destination, source, type, payload, zero
// padding to the 60-byte minimum, FCS (compared with a reference CRC-32),
// the nibble order, busy, the payload pull rate and the 12-byte gap. A
// payload source that withholds one byte checks the underrun report.
module tb_eth_tx;
  import hsr_pkg::*;
  import tb_net_pkg::*;

  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_01;
  logic clk = 0, rst_n = 0;
  logic req = 0;
  frame_type_t req_type = FT_ARP;
  logic [47:0] req_dst_mac = 0;
  logic busy, pl_valid, pl_last, pl_ready, underrun, tx_en;
  logic [7:0] pl_data;
  logic [3:0] txd;

  eth_tx #(.MY_MAC(MY_MAC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // payload source
  bytes_t src;
  int sidx = 0, hole = -1, n_under = 0;
  assign pl_valid = (sidx < src.size()) && (sidx != hole);
  assign pl_data  = pl_valid ? src[sidx] : 8'h00;
  assign pl_last  = (sidx == src.size() - 1);
  always @(posedge clk) begin
    if (pl_ready) begin
      if (sidx == hole) hole <= -1; else sidx <= sidx + 1;
    end
    if (underrun) n_under++;
  end

  // MII monitor
  bytes_t cur, frames[4];
  int nfr = 0, low_run = 0, min_gap = 1000;
  initial begin
    logic [3:0] lo;
    bit half = 0, inf = 0;
    forever begin
      @(negedge clk);
      if (tx_en) begin
        if (inf == 0 && nfr > 0 && low_run < min_gap) min_gap = low_run;
        inf = 1; low_run = 0;
        if (!half) begin lo = txd; half = 1; end else begin cur.push_back({txd, lo}); half = 0; end
      end else begin
        low_run++;
        if (inf) begin frames[nfr] = cur; nfr++; cur = {}; inf = 0; half = 0; end
      end
    end
  end

  task automatic send(input frame_type_t t, input logic [47:0] dst, input bytes_t p);
    while (busy) @(negedge clk);
    src = p; sidx = 0;
    @(negedge clk);
    req = 1; req_type = t; req_dst_mac = dst;
    @(negedge clk);
    req = 0;
    chk(busy, "busy after request");
  endtask

  function automatic bit frame_ok(input bytes_t f, input bytes_t expect_body);
    bytes_t pre;
    for (int i = 0; i < 7; i++) pre.push_back(8'h55);
    pre.push_back(8'hD5);
    foreach (expect_body[i]) pre.push_back(expect_body[i]);
    return f == pre;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p1, p2, p3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    p1 = pattern(10, 1);
    send(FT_ARP, MAC_BCAST, p1);
    p2 = pattern(200, 2);
    send(FT_IP, 48'h0211_2233_4455, p2);     // waits for the first frame and its gap
    while (busy) @(negedge clk);
    chk(nfr == 2, "two frames sent");
    chk(frame_ok(frames[0], eth_frame(MAC_BCAST, MY_MAC, 16'h0806, p1)), "short ARP frame padded, FCS");
    chk(frames[0].size() == 8 + 64, "minimum frame length");
    chk(frame_ok(frames[1], eth_frame(48'h0211_2233_4455, MY_MAC, 16'h0800, p2)), "IP frame, FCS");
    chk(min_gap >= 24, $sformatf("inter-frame gap %0d clocks", min_gap));
    chk(sidx == 200, "all payload bytes pulled");
    chk(n_under == 0, "no underrun");
    // one byte withheld: sent as 0 and reported
    p3 = pattern(60, 3);
    hole = 20;
    send(FT_IP, 48'h0211_2233_4455, p3);
    while (busy) @(negedge clk);
    p3.insert(20, 8'h00);
    chk(n_under == 1, "underrun reported");
    chk(frame_ok(frames[2], eth_frame(48'h0211_2233_4455, MY_MAC, 16'h0800, p3)), "underrun byte sent as 00h");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
