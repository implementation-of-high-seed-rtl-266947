// tb_arp_table - fills a 4-entry ARP table and checks lookups against a
// reference list: insert into free entries, update of a known address
// without a new entry, misses, and round-robin replacement when full.
module tb_arp_table;
  logic clk = 0, rst_n = 0;
  logic upd = 0;
  logic [31:0] upd_ip = 0, lk_ip = 0;
  logic [47:0] upd_mac = 0;
  logic lk_hit;
  logic [47:0] lk_mac;
  logic [2:0] n_valid;

  arp_table #(.ENTRIES(4)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: associative array ip -> mac
  logic [47:0] ref_tbl [logic [31:0]];

  task automatic put(input logic [31:0] ip, input logic [47:0] mac);
    @(negedge clk);
    upd = 1; upd_ip = ip; upd_mac = mac;
    @(negedge clk);
    upd = 0;
  endtask
  task automatic look(input logic [31:0] ip, input bit hit, input logic [47:0] mac, input string what);
    lk_ip = ip;
    #1;
    chk(lk_hit == hit && (!hit || lk_mac == mac), what);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    look(32'h0A000001, 0, 0, "empty table misses");
    for (int i = 0; i < 4; i++) put(32'h0A000001 + i, 48'h1000 + i);
    chk(n_valid == 3'd4, "four entries");
    for (int i = 0; i < 4; i++) look(32'h0A000001 + i, 1, 48'h1000 + i, "inserted entry found");
    put(32'h0A000003, 48'hBEEF);
    chk(n_valid == 3'd4, "update keeps the count");
    look(32'h0A000003, 1, 48'hBEEF, "updated MAC");
    look(32'h0A000009, 0, 0, "unknown address misses");
    // full: replacement round-robin from entry 0
    put(32'h0A000010, 48'hAAAA);
    look(32'h0A000010, 1, 48'hAAAA, "new entry after replacement");
    look(32'h0A000001, 0, 0, "entry 0 replaced");
    look(32'h0A000002, 1, 48'h1001, "entry 1 kept");
    put(32'h0A000011, 48'hBBBB);
    look(32'h0A000002, 0, 0, "entry 1 replaced next");
    look(32'h0A000011, 1, 48'hBBBB, "second replacement found");
    look(32'h0A000003, 1, 48'hBEEF, "entry 2 kept");
    chk(n_valid == 3'd4, "count stays at four");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
