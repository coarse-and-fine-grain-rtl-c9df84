// tb_zuma_lutram: self-checking testbench for zuma_lutram.
// Two instances: the default 64x1 (eLUT / routing mux) and a 64x6 crossbar
// (W = 6 override).  Random contents are written through the configuration
// port one address per clock; the asynchronous read port is then checked
// against a copy for random addresses, and a mux programming (bit a[sel] at
// address a) is checked to pass its selected input.
`timescale 1ns/1ps
module tb_zuma_lutram;
  localparam int K = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         cfg_we = 0;
  logic [K-1:0] cfg_addr = '0, rd_addr = '0;
  logic         d1 = 0, q1;
  logic [5:0]   d6 = '0, q6;
  logic [63:0]  ref1;
  logic [5:0]   ref6 [64];

  zuma_lutram dut1 (.clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(d1),
                    .rd_addr(rd_addr), .rd_data(q1));
  zuma_lutram #(.K(K), .W(6)) dut6 (.clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                    .cfg_data(d6), .rd_addr(rd_addr), .rd_data(q6));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      int sel;
      sel = int'($urandom_range(K - 1));
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        cfg_we = 1; cfg_addr = K'(a);
        d1 = rep[0] ? 1'((a >> sel) & 1) : 1'($urandom);
        d6 = 6'($urandom);
        ref1[a] = d1; ref6[a] = d6;
      end
      @(negedge clk);
      cfg_we = 0;
      for (int t = 0; t < 200; t++) begin
        rd_addr = K'($urandom);
        #1;
        check(q1 == ref1[rd_addr], $sformatf("64x1 read at %0d", rd_addr));
        check(q6 == ref6[rd_addr], $sformatf("64x6 read at %0d", rd_addr));
        if (rep[0]) check(q1 == rd_addr[sel], "programmed as a mux, passes input sel");
        #1;
      end
      // write disabled: contents unchanged
      cfg_addr = '0; d1 = ~ref1[0]; d6 = ~ref6[0];
      @(negedge clk);
      rd_addr = '0; #1;
      check(q1 == ref1[0] && q6 == ref6[0], "no write without cfg_we");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
