// tb_zuma_tile: self-checking testbench for zuma_tile (one cluster with its
// input block, IIB, eBLEs and switch block), default sizes.
// Case 1: random configuration with every eBLE registered, so that eBLE
//   feedback through the IIB passes through flops; random routing inputs
//   every clock.  A cycle model (zuma_tb_pkg) predicts the eBLE outputs
//   after each edge and every outgoing wire.
// Case 2: random configuration with combinational eBLEs and an IIB that
//   takes no eBLE feedback; outputs checked combinationally.
// Both: the staggered wires (out[S+j] = in[j]) and user_en = 0 forcing
// started wires and eBLE outputs to 0.
`timescale 1ns/1ps
module tb_zuma_tile;
  import zuma_tb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             cfg_we = 0, user_en = 0;
  logic [K-1:0]     cfg_addr = '0;
  logic [CFG_W-1:0] cfg_data = '0;
  logic [TRK-1:0]   in_w = '0, out_w;
  logic [N-1:0]     cl_out;

  zuma_tile dut (.clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
                 .user_en(user_en), .in_w(in_w), .out_w(out_w), .cl_out(cl_out));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic configure(tile_cfg_t t);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = K'(a); cfg_data = cfg_word(t, a);
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic logic [TRK-1:0] rand_tracks();
    logic [TRK-1:0] v;
    for (int w = 0; w < TRK/32; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  // expected outgoing wires for given eBLE outputs
  function automatic logic [TRK-1:0] wires_model(tile_cfg_t t, logic [TRK-1:0] inw,
                                                 logic [N-1:0] clo, logic en);
    logic [TRK-1:0] y;
    logic [4*S-1:0] term, st;
    for (int d = 0; d < 4; d++) term[d*S +: S] = inw[d*WD + WD - S +: S];
    st = sb_model(t, term, clo, en);
    for (int d = 0; d < 4; d++) begin
      y[d*WD +: S] = st[d*S +: S];
      y[d*WD + S +: WD - S] = inw[d*WD +: WD - S];
    end
    return y;
  endfunction

  initial begin
    tile_cfg_t t;
    logic [N-1:0] q;
    repeat (2) @(negedge clk);
    rst = 0;
    // ---- case 1: registered eBLEs with feedback ----
    for (int rep = 0; rep < 4; rep++) begin
      t = cfg_random();
      foreach (t.mode[n]) t.mode[n] = 1;
      user_en = 0;
      configure(t);
      #1 check(cl_out == '0 && out_w[0 +: S] == '0, "user_en low: outputs 0");
      rst = 1; @(negedge clk); rst = 0;
      user_en = 1;
      q = '0;
      for (int v = 0; v < 150; v++) begin
        in_w = rand_tracks();
        #1;
        check(cl_out == q, $sformatf("registered eBLEs, config %0d cycle %0d", rep, v));
        check(out_w == wires_model(t, in_w, q, 1'b1), $sformatf("wires, config %0d cycle %0d", rep, v));
        q = lut_model(t, iib_model(t, {q, ib_model(t, in_w)}));
        @(negedge clk);
      end
    end
    // ---- case 2: combinational eBLEs, no feedback ----
    for (int rep = 0; rep < 4; rep++) begin
      t = cfg_random();
      foreach (t.mode[n]) t.mode[n] = 0;
      foreach (t.s2[j, n]) if (t.s2[j][n] >= I / K) t.s2[j][n] = int'($urandom_range(I/K - 1));
      user_en = 0;        // as in the fabric: eBLE outputs held at 0 while loading
      configure(t);
      user_en = 1;
      for (int v = 0; v < 150; v++) begin
        in_w = rand_tracks();
        #1;
        q = lut_model(t, iib_model(t, {N'(0), ib_model(t, in_w)}));
        check(cl_out == q, $sformatf("combinational eBLEs, config %0d vector %0d", rep, v));
        check(out_w == wires_model(t, in_w, q, 1'b1), $sformatf("wires, config %0d vector %0d", rep, v));
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
