// tb_zuma_input_block: self-checking testbench for zuma_input_block, the
// 28 routing-track-to-cluster-input multiplexers (Fc_in = 6 of 224 tracks
// each), at the default sizes.  Random selections (including constant 0)
// are configured; for random track values every cluster input is compared
// with the reference model.  A second case checks each mux can reach each
// of its six tracks.
`timescale 1ns/1ps
module tb_zuma_input_block;
  import zuma_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic           cfg_we = 0;
  logic [K-1:0]   cfg_addr = '0;
  logic [I-1:0]   cfg_data = '0;
  logic [TRK-1:0] tracks = '0;
  logic [I-1:0]   cl_in;

  zuma_input_block dut (.clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                        .cfg_data(cfg_data), .tracks(tracks), .cl_in(cl_in));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic configure(tile_cfg_t t);
    for (int a = 0; a < 64; a++) begin
      logic [CFG_W-1:0] w;
      w = cfg_word(t, a);
      @(negedge clk);
      cfg_we = 1; cfg_addr = K'(a); cfg_data = w[0 +: I];
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    tile_cfg_t t;
    for (int rep = 0; rep < 6; rep++) begin
      t = cfg_random();
      configure(t);
      for (int v = 0; v < 200; v++) begin
        for (int w = 0; w < TRK/32; w++) tracks[w*32 +: 32] = $urandom;
        #1;
        check(cl_in == ib_model(t, tracks), $sformatf("config %0d vector %0d", rep, v));
      end
    end
    for (int j = 0; j < K; j++) begin
      t = cfg_off();
      foreach (t.ib[i]) t.ib[i] = j;
      configure(t);
      for (int i = 0; i < I; i++) begin
        tracks = '0; tracks[track_of(i, j)] = 1'b1;
        #1;
        check(cl_in[i] == 1'b1, $sformatf("mux %0d reaches track %0d", i, track_of(i, j)));
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
