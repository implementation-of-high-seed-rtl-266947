// tb_stack_ram - writes random bytes to random addresses of a 256-byte RAM
// and reads them back, comparing with a reference array; checks the
// one-clock read latency, that rdata holds without re, and that a read of
// the address being written returns the old byte.
module tb_stack_ram;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0, wdata = 0, rdata;

  stack_ram #(.AW(8)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] model [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 500; k++) begin
      logic [7:0] a;
      a = 8'($urandom);
      if ($urandom % 2) begin
        we = 1; waddr = 8'($urandom); wdata = 8'($urandom);
      end else we = 0;
      re = 1; raddr = a;
      @(negedge clk);
      if (rdata != model[a]) bad++;
      if (we) model[waddr] = wdata;
    end
    chk(bad == 0, "random reads after one clock");
    we = 0; re = 0;
    begin
      logic [7:0] held;
      held = rdata;
      raddr = 8'd3;
      @(negedge clk); @(negedge clk);
      chk(rdata == held, "rdata held without re");
    end
    we = 1; waddr = 8'd9; wdata = ~model[9]; re = 1; raddr = 8'd9;
    @(negedge clk);
    chk(rdata == model[9], "read during write returns the old byte");
    we = 0;
    @(negedge clk);
    chk(rdata == ~model[9], "new byte after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
