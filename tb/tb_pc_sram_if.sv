// tb_pc_sram_if - sends write and read commands to the PC interface and
// serves its memory requests from a model RAM that grants after a random
// delay (as when the stack holds the port). Checks the bytes written, the
// bytes read back on pc_dout, busy, that bytes strobed while busy are
// ignored, and that unknown command bytes are counted and skipped.
module tb_pc_sram_if;
  logic clk = 0, rst_n = 0;
  logic pc_stb = 0;
  logic [7:0] pc_din = 0, pc_dout, mem_wdata, mem_rdata, n_bad;
  logic pc_dout_valid, pc_busy, mem_we, mem_re, mem_wgnt, mem_rgnt, mem_rvalid;
  logic [11:0] mem_waddr, mem_raddr;

  pc_sram_if #(.AW(12)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model RAM with random grant delay
  logic [7:0] ram [4096];
  logic free;
  always @(negedge clk) free <= ($urandom % 3 != 0);
  assign mem_wgnt = mem_we && free;
  assign mem_rgnt = mem_re && free;
  always @(posedge clk) begin
    if (mem_wgnt) ram[mem_waddr] <= mem_wdata;
    mem_rvalid <= mem_rgnt;
    if (mem_rgnt) mem_rdata <= ram[mem_raddr];
  end

  int nvalid = 0;
  logic [7:0] last_dout;
  always @(negedge clk) if (pc_dout_valid) begin nvalid++; last_dout = pc_dout; end

  task automatic put(input logic [7:0] b);
    while (pc_busy) @(negedge clk);
    pc_din = b; pc_stb = 1;
    @(negedge clk);
    pc_stb = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] data [64];
    int bad = 0;
    for (int i = 0; i < 4096; i++) ram[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      data[i] = 8'($urandom);
      put(8'h01); put(8'h01); put(8'(i * 3)); put(data[i]);
    end
    while (pc_busy) @(negedge clk);
    for (int i = 0; i < 64; i++) if (ram[12'h100 + i * 3] != data[i]) bad++;
    chk(bad == 0, "writes land at the addressed bytes");
    bad = 0;
    for (int i = 0; i < 64; i++) begin
      int n0;
      n0 = nvalid;
      put(8'h02); put(8'hF1); put(8'(i * 3));   // upper address bits beyond AW ignored
      while (nvalid == n0) @(negedge clk);
      if (last_dout != data[i]) bad++;
    end
    chk(bad == 0 && nvalid == 64, "reads return the written bytes");
    // bytes strobed while busy are ignored
    put(8'h01); put(8'h00); put(8'h05); put(8'hA5);
    chk(pc_busy, "busy while the write waits");
    pc_din = 8'h02; pc_stb = 1; @(negedge clk); pc_stb = 0;
    while (pc_busy) @(negedge clk);
    put(8'h02); put(8'h00); put(8'h05);
    begin
      int n0;
      n0 = nvalid;
      while (nvalid == n0) @(negedge clk);
    end
    chk(last_dout == 8'hA5, "byte strobed while busy ignored");
    put(8'h77); put(8'h00);
    chk(n_bad == 8'd2, "unknown command bytes counted");
    put(8'h02); put(8'h00); put(8'h05);
    begin
      int n0;
      n0 = nvalid;
      while (nvalid == n0) @(negedge clk);
    end
    chk(last_dout == 8'hA5, "interface resynchronised after bad bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
