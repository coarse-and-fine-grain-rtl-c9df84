// tb_zuma_switch_block: self-checking testbench for zuma_switch_block, the
// 56 wire-start multiplexers (Fs = 3 terminating wires plus three eBLE
// outputs each), at the default sizes.  Random selections are configured;
// for random terminating wires and eBLE outputs every started wire is
// compared with the reference model, with user_en both high and low.
`timescale 1ns/1ps
module tb_zuma_switch_block;
  import zuma_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic           cfg_we = 0, user_en = 0;
  logic [K-1:0]   cfg_addr = '0;
  logic [4*S-1:0] cfg_data = '0, term = '0, start;
  logic [N-1:0]   cl_out = '0;

  zuma_switch_block dut (.clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
                         .user_en(user_en), .term(term), .cl_out(cl_out), .start(start));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    tile_cfg_t t;
    for (int rep = 0; rep < 8; rep++) begin
      t = cfg_random();
      for (int a = 0; a < 64; a++) begin
        logic [CFG_W-1:0] w;
        w = cfg_word(t, a);
        @(negedge clk);
        cfg_we = 1; cfg_addr = K'(a); cfg_data = w[O_SB +: 4*S];
      end
      @(negedge clk);
      cfg_we = 0;
      for (int v = 0; v < 200; v++) begin
        term = (4*S)'({$urandom, $urandom});
        cl_out = N'($urandom);
        user_en = (v % 10) != 0;
        #1;
        check(start == sb_model(t, term, cl_out, user_en), $sformatf("config %0d vector %0d", rep, v));
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
