// tb_eth_rx - drives MII frames into the Ethernet receiver and checks the
// payload stream, the frame type, the SOF/EOF markers, the byte rate (one
// byte per two clocks) and the good/bad verdict: an ARP broadcast, an IP
// frame to our MAC, a frame for another MAC (ignored), an unknown type
// (ignored), a frame with a damaged FCS and one with rx_er.
module tb_eth_rx;
  import hsr_pkg::*;
  import tb_net_pkg::*;

  localparam logic [47:0] MY_MAC = 48'h02_00_00_00_00_01;
  logic clk = 0, rst_n = 0;
  logic [3:0] rxd = 0;
  logic rx_dv = 0, rx_er = 0;
  logic fr_valid, fr_sof, fr_eof, fr_ok;
  logic [7:0] fr_data;
  frame_type_t fr_type;

  eth_rx #(.MY_MAC(MY_MAC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bytes_t got;
  int n_sof = 0, n_eof = 0, last_ok = 0, gap_bad = 0, last_t = -10, t = 0;
  frame_type_t last_type;
  always @(negedge clk) begin
    t++;
    if (fr_valid) begin
      got.push_back(fr_data);
      if (fr_sof) n_sof++;
      if (!fr_sof && t - last_t != 2) gap_bad++;
      last_t = t;
      last_type = fr_type;
    end
    if (fr_eof) begin n_eof++; last_ok = fr_ok; end
  end

  task automatic send(input bytes_t f, input int flip = -1, input int er = -1);
    @(negedge clk);
    rx_dv = 1;
    for (int i = 0; i < 15; i++) begin rxd = 4'h5; @(negedge clk); end
    rxd = 4'hD; @(negedge clk);
    foreach (f[i]) begin
      logic [7:0] b;
      b = (i == flip) ? f[i] ^ 8'h10 : f[i];
      rx_er = (i == er);
      rxd = b[3:0]; @(negedge clk);
      rx_er = 0;
      rxd = b[7:4]; @(negedge clk);
    end
    rx_dv = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ARP broadcast
    f = eth_frame(MAC_BCAST, 48'h0211_2233_4455, 16'h0806, pattern(28, 1));
    got = {}; send(f);
    chk(got == slice(f, 14, f.size() - 14), "ARP payload bytes (with padding and FCS)");
    chk(last_type == FT_ARP && n_sof == 1 && n_eof == 1 && last_ok == 1, $sformatf("ARP type, sof, eof, ok %0d %0d %0d %0d", last_type, n_sof, n_eof, last_ok));
    chk(gap_bad == 0, "one byte every two clocks");
    // IP to our MAC, long
    f = eth_frame(MY_MAC, 48'h0211_2233_4455, 16'h0800, pattern(300, 2));
    got = {}; send(f);
    chk(got == slice(f, 14, f.size() - 14), "IP payload bytes");
    chk(last_type == FT_IP && n_sof == 2 && n_eof == 2 && last_ok == 1, "IP type, sof, eof, ok");
    // other MAC: ignored
    got = {}; send(eth_frame(48'h0200_0000_0002, 48'h0211_2233_4455, 16'h0800, pattern(50, 3)));
    chk(got.size() == 0 && n_eof == 2, "frame for another MAC ignored");
    // unknown type: ignored
    got = {}; send(eth_frame(MY_MAC, 48'h0211_2233_4455, 16'h86DD, pattern(50, 3)));
    chk(got.size() == 0 && n_eof == 2, "unknown ethertype ignored");
    // FCS error
    got = {}; send(eth_frame(MY_MAC, 48'h0211_2233_4455, 16'h0800, pattern(50, 4)), 30);
    chk(n_eof == 3 && last_ok == 0, "damaged frame reported bad");
    // rx_er
    got = {}; send(eth_frame(MY_MAC, 48'h0211_2233_4455, 16'h0800, pattern(50, 5)), -1, 40);
    chk(n_eof == 4 && last_ok == 0, "rx_er frame reported bad");
    // good again
    got = {}; send(eth_frame(MY_MAC, 48'h0211_2233_4455, 16'h0806, pattern(46, 6)));
    chk(n_eof == 5 && last_ok == 1 && last_type == FT_ARP, "good frame after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
