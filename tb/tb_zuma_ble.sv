// tb_zuma_ble: self-checking testbench for zuma_ble (eLUT plus flop).
// A random truth table and mode are written through the configuration port
// (64 clocks, mode bit taken at address 0).  Combinational mode: out equals
// the table entry of the current inputs.  Registered mode: out equals the
// entry of the inputs before the last clock edge.  Reset clears the flop;
// user_en low forces out to 0.  Reset clears the flop, not the mode.
`timescale 1ns/1ps
module tb_zuma_ble;
  localparam int K = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         cfg_we = 0, lut_bit = 0, mode_bit = 0, user_en = 0, out;
  logic [K-1:0] cfg_addr = '0, in = '0;
  logic [63:0]  tt;

  zuma_ble dut (.clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                .cfg_lut_bit(lut_bit), .cfg_mode_bit(mode_bit), .user_en(user_en),
                .in(in), .out(out));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic configure(logic [63:0] t, logic m);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = K'(a); lut_bit = t[a]; mode_bit = (a == 0) ? m : ~m;
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    logic prev;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 6; rep++) begin
      logic m;
      m = rep[0];
      tt = {$urandom, $urandom};
      user_en = 0;
      configure(tt, m);
      in = K'($urandom); #1;
      check(out == 1'b0, "user_en low holds the output at 0");
      user_en = 1;
      prev = tt[in];
      for (int t = 0; t < 100; t++) begin
        @(negedge clk);
        if (m) check(out == prev, $sformatf("registered mode, cycle %0d", t));
        in = K'($urandom);
        #1;
        if (!m) check(out == tt[in], $sformatf("combinational mode, in=%0d", in));
        prev = tt[in];
      end
      if (m) begin
        rst = 1; @(negedge clk); rst = 0;
        // reset clears the flop but keeps the configured mode
        #1 check(out == 1'b0, "reset clears the flop, mode kept");
      end
    end
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
