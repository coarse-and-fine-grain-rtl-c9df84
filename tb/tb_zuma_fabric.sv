// tb_zuma_fabric: self-checking testbench for zuma_fabric at its default
// 3x3 size, configured only through the bitstream port.
// The bitstream (9 tiles x 64 words of 184 bits, one word per clock while
// bs_rd is high) sets every switch block straight and makes tile (0,0)
// compute a registered 4-input XOR of eastbound wires 0, 8, 16 and 24
// (input block -> IIB -> eLUT 0 -> flop) driving its eastbound start
// wire 0, which reaches the east edge at wire 2*S = 28.
// Checks: while loading, cfg_done is low and every wire started by a switch
// block and every eBLE output is 0; after cfg_done each edge bus matches a
// model of the staggered routing, the XOR output follows its inputs one
// clock later; a second load (all tiles straight) removes the XOR.
`timescale 1ns/1ps
module tb_zuma_fabric;
  import zuma_tb_pkg::*;
  localparam int ROWS = 3, COLS = 3, G = ROWS*COLS;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                      begin_cfg = 0, bs_rd, cfg_done;
  logic [CFG_W-1:0]          bs_data;
  logic [ROWS-1:0][WD-1:0]   in_e = '0, in_w = '0, out_e, out_w;
  logic [COLS-1:0][WD-1:0]   in_n = '0, in_s = '0, out_n, out_s;
  logic [G-1:0][N-1:0]       cl_out;

  zuma_fabric dut (.clk(clk), .rst(rst), .begin_cfg(begin_cfg), .bs_data(bs_data), .bs_rd(bs_rd),
                   .cfg_done(cfg_done), .io_in_e(in_e), .io_in_w(in_w), .io_in_n(in_n),
                   .io_in_s(in_s), .io_out_e(out_e), .io_out_w(out_w), .io_out_n(out_n),
                   .io_out_s(out_s), .cl_out(cl_out));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bitstream source: word idx = tile * 64 + address
  logic [CFG_W-1:0] bits [G*64];
  int idx = 0;
  assign bs_data = bits[idx < G*64 ? idx : 0];
  always @(posedge clk) if (bs_rd) idx <= idx + 1;

  int xor_tile;   // -1: none
  logic xq, last_x;

  function automatic tile_cfg_t straight();
    tile_cfg_t t;
    t = cfg_off();
    foreach (t.sb[i]) t.sb[i] = 0;
    return t;
  endfunction

  task automatic build(bit with_xor);
    tile_cfg_t t;
    for (int g = 0; g < G; g++) begin
      t = straight();
      if (with_xor && g == 0) begin
        for (int j = 0; j < 4; j++) begin
          t.ib[j] = 0;                 // cluster input j <- track 8j
          t.s1[0][j] = j;              // first stage: identity
          t.s2[j][0] = 0;              // eLUT 0 input j <- first-stage crossbar 0
        end
        for (int a = 0; a < 64; a++) t.lut[0][a] = ^a[3:0];
        t.mode[0] = 1;
        t.sb[0] = 3;                   // eastbound start wire 0 <- eBLE 0
      end
      for (int a = 0; a < 64; a++) bits[g*64 + a] = cfg_word(t, a);
    end
    xor_tile = with_xor ? 0 : -1;
  endtask

  function automatic logic [WD-1:0] tile_model(int g, int d, logic [WD-1:0] b);
    logic [WD-1:0] y;
    y[WD-1:S] = b[WD-S-1:0];
    for (int s = 0; s < S; s++) y[s] = b[WD-S+s];
    if (g == xor_tile && d == 0) y[0] = xq;
    return y;
  endfunction

  task automatic check_all(string tag);
    for (int r = 0; r < ROWS; r++) begin
      logic [WD-1:0] be, bw;
      be = in_e[r]; bw = in_w[r];
      for (int c = 0; c < COLS; c++) be = tile_model(r*COLS + c, 0, be);
      for (int c = COLS-1; c >= 0; c--) bw = tile_model(r*COLS + c, 1, bw);
      check(out_e[r] == be, $sformatf("%s: east edge row %0d", tag, r));
      check(out_w[r] == bw, $sformatf("%s: west edge row %0d", tag, r));
    end
    for (int c = 0; c < COLS; c++) begin
      logic [WD-1:0] bn, bs;
      bn = in_n[c]; bs = in_s[c];
      for (int r = 0; r < ROWS; r++) bn = tile_model(r*COLS + c, 2, bn);
      for (int r = ROWS-1; r >= 0; r--) bs = tile_model(r*COLS + c, 3, bs);
      check(out_n[c] == bn, $sformatf("%s: north edge col %0d", tag, c));
      check(out_s[c] == bs, $sformatf("%s: south edge col %0d", tag, c));
    end
  endtask

  task automatic random_inputs();
    for (int r = 0; r < ROWS; r++) begin
      in_e[r] = WD'({$urandom, $urandom}); in_w[r] = WD'({$urandom, $urandom});
    end
    for (int c = 0; c < COLS; c++) begin
      in_n[c] = WD'({$urandom, $urandom}); in_s[c] = WD'({$urandom, $urandom});
    end
  endtask

  task automatic load();
    int n;
    @(negedge clk);
    begin_cfg = 1; idx = 0;
    @(negedge clk);
    begin_cfg = 0;
    n = 0;
    while (!cfg_done && n < G*64 + 10) begin
      random_inputs();
      last_x = in_e[0][0] ^ in_e[0][8] ^ in_e[0][16] ^ in_e[0][24];
      #1;
      check(cl_out == '0, "eBLE outputs 0 while loading");
      for (int r = 0; r < ROWS; r++)
        check(out_e[r][0 +: COLS*S] == '0 && out_w[r][0 +: COLS*S] == '0,
              "switch-block wires 0 while loading");
      @(negedge clk);
      n++;
    end
    check(cfg_done && n == G*64, $sformatf("configuration took %0d clocks", n));
    check(idx == G*64, $sformatf("%0d bitstream words read", idx));
  endtask

  task automatic run_user(int cycles);
    logic nxt;
    xq = last_x;     // the flop runs during loading; it holds the last inputs' XOR
    for (int v = 0; v < cycles; v++) begin
      random_inputs();
      #1;
      check_all($sformatf("user cycle %0d", v));
      nxt = in_e[0][0] ^ in_e[0][8] ^ in_e[0][16] ^ in_e[0][24];
      @(negedge clk);
      xq = nxt;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    build(1'b1);
    load();
    run_user(200);
    build(1'b0);
    load();
    run_user(50);
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
