// tb_carbon_mem: checks the Razor operand memory.
//  1. write then read (one-cycle synchronous read) on all three ports
//  2. read of the address written in the previous cycle (bypass register)
//  3. a corrupted write is flagged by mem_err exactly one cycle later and the
//     shadow value is written back, so the next read returns the right word
//  4. load_shadow delays an incoming write by one cycle
//  5. a write arriving while the shadow path is busy is not lost
module tb_carbon_mem;
  import carbon_pkg::*;
  logic clk = 0, rst = 1;
  logic we = 0, load_shadow = 0;
  addr_t waddr = '0;
  word_t wdata = '0, err_inject = '0;
  addr_t raddr [3];
  word_t rdata [3];
  logic  mem_err;
  int checks = 0, failures = 0, cyc = 0;
  int n_err_seen = 0;

  carbon_mem dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
    .err_inject(err_inject), .load_shadow(load_shadow), .raddr(raddr), .rdata(rdata),
    .mem_err(mem_err));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic wr(addr_t a, word_t d);
    we = 1; waddr = a; wdata = d;
    @(negedge clk);
    we = 0;
  endtask

  // read address a on port p: present now, data valid after the next edge
  task automatic rd_check(int p, addr_t a, word_t exp, string what);
    raddr[p] = a;
    @(negedge clk);
    check(what, rdata[p] === exp);
  endtask

  word_t ref_mem [16];

  initial begin
    for (int p = 0; p < 3; p++) raddr[p] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. fill memory, then read back on every port
    for (int a = 0; a < 16; a++) begin
      ref_mem[a] = $urandom;
      wr(addr_t'(a), ref_mem[a]);
    end
    @(negedge clk);
    for (int a = 0; a < 16; a++)
      for (int p = 0; p < 3; p++) rd_check(p, addr_t'(a), ref_mem[a], "plain read");
    // 2. bypass: read address presented in the same cycle as the write
    for (int n = 0; n < 20; n++) begin
      addr_t a; word_t d;
      a = addr_t'($urandom_range(0, 15)); d = $urandom;
      we = 1; waddr = a; wdata = d; raddr[1] = a;
      @(negedge clk);
      we = 0; ref_mem[a] = d;
      check("bypass read", rdata[1] === d);
      check("no false error", mem_err === 1'b0);
    end
    // 3. corrupted write: mem_err one cycle later, then corrected
    @(negedge clk);
    we = 1; waddr = 4'd7; wdata = 32'hCAFE_0001; err_inject = 32'h0000_0100;
    raddr[0] = 4'd7;
    @(negedge clk);
    we = 0; err_inject = '0;
    check("error flagged next cycle", mem_err === 1'b1);
    check("bad word visible before correction", rdata[0] === 32'hCAFE_0101);
    if (mem_err) n_err_seen++;
    @(negedge clk);
    check("error cleared", mem_err === 1'b0);
    check("corrected by shadow write", rdata[0] === 32'hCAFE_0001);
    ref_mem[7] = 32'hCAFE_0001;
    @(negedge clk);
    check("memory holds corrected word", rdata[0] === 32'hCAFE_0001);
    // 4. load_shadow: write made while load_shadow is high lands one cycle later
    raddr[2] = 4'd3;
    we = 1; waddr = 4'd3; wdata = 32'h1234_5678; load_shadow = 1;
    @(negedge clk);
    we = 0; load_shadow = 1;       // second shadow cycle writes it
    check("delayed write not yet visible", rdata[2] === ref_mem[3]);
    @(negedge clk);
    load_shadow = 0;
    check("delayed write visible one cycle later", rdata[2] === 32'h1234_5678);
    ref_mem[3] = 32'h1234_5678;
    // 5. write arriving during a single load_shadow cycle is kept (pend)
    we = 1; waddr = 4'd9; wdata = 32'h0BAD_F00D; load_shadow = 1; raddr[2] = 4'd9;
    @(negedge clk);
    we = 0; load_shadow = 0;
    @(negedge clk);
    check("pending write kept", rdata[2] === 32'h0BAD_F00D);
    check("no error after shadow writes", mem_err === 1'b0);
    check("exactly one error seen", n_err_seen == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
