// tb_zuma_config_ctrl: self-checking testbench for zuma_config_ctrl at its
// default size (9 tiles, 64 LUTRAM addresses, 184-bit words).
// After begin_cfg the controller must, for 9 x 64 clocks, assert the write
// enable of exactly one tile (tile g during clocks g*64 .. g*64+63), count
// the shared address 0..63 within each tile, pass the bitstream word
// through and read one word per clock; then raise done and stop.  A second
// begin_cfg issued in the middle of loading restarts from tile 0.
`timescale 1ns/1ps
module tb_zuma_config_ctrl;
  localparam int K = 6, G = 9, DW = 184;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          begin_cfg = 0, bs_rd, done;
  logic [DW-1:0] bs_data = '0, cfg_data;
  logic [G-1:0]  cfg_we;
  logic [K-1:0]  cfg_addr;

  zuma_config_ctrl dut (.clk(clk), .rst(rst), .begin_cfg(begin_cfg), .bs_data(bs_data),
                        .bs_rd(bs_rd), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                        .cfg_data(cfg_data), .done(done));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load(int stop_after);
    @(negedge clk);
    begin_cfg = 1;
    @(negedge clk);
    begin_cfg = 0;
    for (int t = 0; t < G * 64 && t < stop_after; t++) begin
      bs_data = {6{$urandom}}[DW-1:0];
      #1;
      check(bs_rd == 1'b1, "bitstream read every clock while loading");
      check(cfg_we == G'(1) << (t / 64), $sformatf("clock %0d: write enable of tile %0d", t, t / 64));
      check(cfg_addr == K'(t % 64), $sformatf("clock %0d: address", t));
      check(cfg_data == bs_data, "data passed through");
      check(done == 1'b0, "done low while loading");
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    #1 check(done == 0 && bs_rd == 0 && cfg_we == '0, "idle after reset");
    rst = 0;
    load(100);          // interrupted
    load(G * 64);
    #1;
    check(done == 1'b1, "done after all tiles");
    check(cfg_we == '0 && bs_rd == 1'b0, "no writes after done");
    repeat (70) @(negedge clk);
    check(done == 1'b1 && cfg_we == '0, "done stays, nothing written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
