// tb_memory_mux - drives random stack and PC accesses into the memory
// multiplexor, with a RAM behind it, and checks against a reference: the
// stack is never refused, a PC access is granted exactly when the stack
// leaves that port free, the RAM sees the winner's address and data, and
// read data is marked valid for the side that issued the read, one clock
// later, with the right byte.
module tb_memory_mux;
  logic clk = 0, rst_n = 0;
  logic st_we = 0, st_re = 0, pc_we = 0, pc_re = 0;
  logic [7:0] st_waddr = 0, st_raddr = 0, pc_waddr = 0, pc_raddr = 0;
  logic [7:0] st_wdata = 0, pc_wdata = 0;
  logic st_rvalid, pc_wgnt, pc_rgnt, pc_rvalid;
  logic ram_we, ram_re;
  logic [7:0] ram_waddr, ram_raddr, ram_wdata, ram_rdata;

  memory_mux #(.AW(8)) dut (.*);
  stack_ram #(.AW(8)) u_ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
                             .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));
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
    int bad_route = 0, bad_gnt = 0, bad_data = 0, bad_valid = 0, n_pc_wait = 0, n_pc_rd = 0, n_st_rd = 0;
    bit exp_st, exp_pc;
    logic [7:0] exp_byte;
    for (int i = 0; i < 256; i++) model[i] = 0;
    exp_st = 0; exp_pc = 0; exp_byte = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // clear the RAM through the stack port
    for (int i = 0; i < 256; i++) begin st_we = 1; st_waddr = 8'(i); st_wdata = 0; @(negedge clk); end
    st_we = 0;
    @(negedge clk);
    for (int k = 0; k < 2000; k++) begin
      st_we = ($urandom % 3 == 0); st_waddr = 8'($urandom % 16); st_wdata = 8'($urandom);
      st_re = ($urandom % 3 == 0); st_raddr = 8'($urandom % 16);
      pc_we = ($urandom % 2 == 0); pc_waddr = 8'($urandom % 16); pc_wdata = 8'($urandom);
      pc_re = ($urandom % 2 == 0); pc_raddr = 8'($urandom % 16);
      #1;
      // read data of the previous clock
      if (st_rvalid != exp_st || pc_rvalid != exp_pc) bad_valid++;
      if ((exp_st || exp_pc) && ram_rdata != exp_byte) bad_data++;
      if (pc_wgnt != (pc_we && !st_we) || pc_rgnt != (pc_re && !st_re)) bad_gnt++;
      if (st_we && (ram_waddr != st_waddr || ram_wdata != st_wdata || !ram_we)) bad_route++;
      if (!st_we && pc_we && (ram_waddr != pc_waddr || ram_wdata != pc_wdata || !ram_we)) bad_route++;
      if (st_re && (ram_raddr != st_raddr || !ram_re)) bad_route++;
      if (!st_re && pc_re && (ram_raddr != pc_raddr || !ram_re)) bad_route++;
      if (pc_we && st_we) n_pc_wait++;
      exp_st = st_re;
      exp_pc = !st_re && pc_re;
      n_st_rd += exp_st; n_pc_rd += exp_pc;
      exp_byte = st_re ? model[st_raddr] : model[pc_raddr];
      @(negedge clk);
      if (st_we) model[st_waddr] = st_wdata;
      else if (pc_we) model[pc_waddr] = pc_wdata;
    end
    chk(bad_gnt == 0, "PC granted exactly when the stack leaves the port");
    chk(bad_route == 0, "RAM gets the winner's address and data");
    chk(bad_valid == 0, "read data marked for the right side");
    chk(bad_data == 0, "read data correct");
    chk(n_pc_wait > 0 && n_pc_rd > 0 && n_st_rd > 0, "contention and both readers exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
