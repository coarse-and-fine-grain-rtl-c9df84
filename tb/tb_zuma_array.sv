// tb_zuma_array: self-checking testbench for zuma_array at the default 3x3
// size.  Configuration is written tile by tile through the per-tile write
// enables.  A model follows each edge bus through the row or column of
// tiles (each tile shifts the bus by S = 14 wires and restarts wires 0..13
// from its switch block).
//   A: every switch block straight (a terminating wire continues in its own
//      direction): all four edge buses checked for random inputs.
//   B: only the centre tile reloaded with its switch block off: the wires
//      it starts read 0 at the far edges, nothing else changes.
//   C: tile (0,0) reloaded with eBLE 0 an inverter of eastbound wire 0
//      driving its eastbound start wire 0 (through the input block, IIB
//      and switch block); checked at the east edge.
`timescale 1ns/1ps
module tb_zuma_array;
  import zuma_tb_pkg::*;
  localparam int ROWS = 3, COLS = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [ROWS*COLS-1:0]      cfg_we = '0;
  logic [K-1:0]              cfg_addr = '0;
  logic [CFG_W-1:0]          cfg_data = '0;
  logic                      user_en = 0;
  logic [ROWS-1:0][WD-1:0]   in_e = '0, in_w = '0, out_e, out_w;
  logic [COLS-1:0][WD-1:0]   in_n = '0, in_s = '0, out_n, out_s;
  logic [ROWS*COLS-1:0][N-1:0] cl_out;

  zuma_array dut (.clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
                  .user_en(user_en), .io_in_e(in_e), .io_in_w(in_w), .io_in_n(in_n),
                  .io_in_s(in_s), .io_out_e(out_e), .io_out_w(out_w), .io_out_n(out_n),
                  .io_out_s(out_s), .cl_out(cl_out));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // tile modes for the model: 0 straight, 1 switch block off, 2 = C case
  int mode [ROWS*COLS];

  task automatic configure(int g, tile_cfg_t t);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      cfg_we = '0; cfg_we[g] = 1'b1; cfg_addr = K'(a); cfg_data = cfg_word(t, a);
    end
    @(negedge clk);
    cfg_we = '0;
  endtask

  function automatic tile_cfg_t straight();
    tile_cfg_t t;
    t = cfg_off();
    foreach (t.sb[i]) t.sb[i] = 0;
    return t;
  endfunction

  // one tile on a bus travelling in direction d
  function automatic logic [WD-1:0] tile_model(int g, int d, logic [WD-1:0] b);
    logic [WD-1:0] y;
    y[WD-1:S] = b[WD-S-1:0];
    for (int s = 0; s < S; s++) y[s] = (mode[g] == 1) ? 1'b0 : b[WD-S+s];
    if (mode[g] == 2 && d == 0) y[0] = ~b[0];
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

  initial begin
    tile_cfg_t t;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int g = 0; g < ROWS*COLS; g++) begin
      mode[g] = 0;
      configure(g, straight());
    end
    user_en = 1;
    for (int v = 0; v < 100; v++) begin
      random_inputs(); #1 check_all("A");
      @(negedge clk);
    end
    // B
    configure(4, cfg_off());
    mode[4] = 1;
    for (int v = 0; v < 100; v++) begin
      random_inputs(); #1 check_all("B");
      @(negedge clk);
    end
    // C
    t = straight();
    t.ib[0] = 0;                   // cluster input 0 <- track 0 (eastbound wire 0)
    t.s1[0][0] = 0; t.s2[0][0] = 0; // eLUT 0 input 0 <- cluster input 0
    t.lut[0] = 64'h5555_5555_5555_5555;
    t.sb[0] = 3;                   // eastbound start wire 0 <- eBLE 0
    configure(0, t);
    mode[0] = 2;
    for (int v = 0; v < 100; v++) begin
      random_inputs(); #1 check_all("C");
      check(cl_out[0][0] == ~in_e[0][0], "C: eBLE 0 output");
      @(negedge clk);
    end
    user_en = 0;
    #1 check(out_e[0][2*S] == 1'b0 && cl_out == '0, "user_en low: eBLE outputs 0");
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
