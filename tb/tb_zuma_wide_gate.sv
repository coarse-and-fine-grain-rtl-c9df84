// tb_zuma_wide_gate: the board test circuits of ZUMA, a 32-input AND and a
// 32-input OR, placed and routed by hand on the default 3x3 fabric
// (k = 6, N = 8) and loaded through the bitstream port.
//
// Mapping (the same for both gates, only the truth tables differ):
//   tile (0,0): 28 operand bits enter on the west edge (eastbound wires) and
//     the south edge (northbound wires); the input block picks each one up
//     on one of its six candidate tracks (a greedy search below).  eLUTs 0..3
//     combine cluster inputs 0..23, eLUT 4 inputs 24..27, eLUT 5 the five
//     partial results through the IIB feedback.  eLUT 5 drives eastbound
//     start wire 4, which reaches the east edge as wire 32 (checked) and
//     enters tile (0,1) as track 4.
//   tile (0,1): the partial result and the remaining 4 operand bits (south
//     edge, column 1) meet in eLUT 0, which drives eastbound start wire 0;
//     it leaves the east edge as wire 14, the 32-bit result.
// All eBLEs are combinational; every other tile is switched off.
// Checks, for random operands and for all-ones / single-zero (AND) and
// all-zero / single-one (OR) operands: the 28-bit partial and the 32-bit
// result on the east edge equal the gate computed here.
`timescale 1ns/1ps
module tb_zuma_wide_gate;
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

  logic [CFG_W-1:0] bits [G*64];
  int idx = 0;
  assign bs_data = bits[idx < G*64 ? idx : 0];
  always @(posedge clk) if (bs_rd) idx <= idx + 1;

  localparam int PART_S = 4, PART_IN = 19, PART_J = 2;   // start wire, its reader
  int trk0 [28];      // tile (0,0): track of operand bit b (cluster input b)
  int in1  [4];       // tile (0,1): cluster inputs of operand bits 28..31
  int trk1 [4];       //             and their tracks (northbound, column 1)

  // eLUT n input j <- IIB signal sig (cluster input, or I + eLUT for feedback)
  task automatic iib_route(inout tile_cfg_t t, input int n, input int j, input int sig);
    int p;
    p = sig / K;
    check(t.s1[p][j] < 0 || t.s1[p][j] == sig % K, "IIB first-stage conflict");
    t.s1[p][j] = sig % K;
    t.s2[j][n] = p;
  endtask

  function automatic bit edge_track(int trk, int first);
    return (trk < WD) || (trk >= 2*WD && trk < 3*WD && first == 1);
  endfunction

  task automatic place();
    bit used [TRK];
    int n;
    foreach (used[i]) used[i] = 0;
    for (int i = 0; i < 28; i++) begin
      trk0[i] = -1;
      for (int j = 0; j < K && trk0[i] < 0; j++)
        if (edge_track(track_of(i, j), 1) && !used[track_of(i, j)]) begin
          trk0[i] = track_of(i, j);
          used[trk0[i]] = 1;
        end
      check(trk0[i] >= 0, $sformatf("tile (0,0) input %0d has an edge track", i));
    end
    check(track_of(PART_IN, PART_J) == PART_S, "partial result track");
    foreach (used[i]) used[i] = 0;
    n = 0;
    for (int i = 0; i < I && n < 4; i++)
      if (i != PART_IN)
        for (int j = 0; j < K; j++) begin
          int tk;
          tk = track_of(i, j);
          if (tk >= 2*WD && tk < 3*WD && !used[tk]) begin
            in1[n] = i; trk1[n] = tk; used[tk] = 1; n++;
            break;
          end
        end
    check(n == 4, "tile (0,1) operand inputs found");
  endtask

  function automatic int sel_of(int i, int trk);
    for (int j = 0; j < K; j++) if (track_of(i, j) == trk) return j;
    return -1;
  endfunction

  task automatic build(bit is_and);
    tile_cfg_t t0, t1, off;
    off = cfg_off();
    t0 = cfg_off();
    for (int i = 0; i < 28; i++) t0.ib[i] = sel_of(i, trk0[i]);
    for (int n = 0; n < 5; n++)
      for (int j = 0; j < ((n < 4) ? K : 4); j++) iib_route(t0, n, j, n*K + j);
    // eLUT 5: inputs 0,1,2 <- eLUT 2,3,4 ; inputs 4,5 <- eLUT 0,1 ; input 3 unused
    iib_route(t0, 5, 0, I + 2); iib_route(t0, 5, 1, I + 3); iib_route(t0, 5, 2, I + 4);
    iib_route(t0, 5, 4, I + 0); iib_route(t0, 5, 5, I + 1);
    for (int a = 0; a < 64; a++) begin
      logic [5:0] v;
      v = 6'(a);
      for (int n = 0; n < 4; n++) t0.lut[n][a] = is_and ? &v : |v;
      t0.lut[4][a] = is_and ? &v[3:0] : |v[3:0];
      t0.lut[5][a] = is_and ? (&v[2:0] & v[4] & v[5]) : (|v[2:0] | v[4] | v[5]);
    end
    t0.sb[0*S + PART_S] = 4;             // eastbound wire 4 <- cl_out[(3*4 + 1) mod 8] = eLUT 5

    t1 = cfg_off();
    t1.ib[PART_IN] = PART_J;
    iib_route(t1, 0, 0, PART_IN);
    for (int k = 0; k < 4; k++) begin
      t1.ib[in1[k]] = sel_of(in1[k], trk1[k]);
      iib_route(t1, 0, k + 1, in1[k]);
    end
    for (int a = 0; a < 64; a++) begin
      logic [5:0] v;
      v = 6'(a);
      t1.lut[0][a] = is_and ? &v[4:0] : |v[4:0];
    end
    t1.sb[0*S + 0] = 3;                  // eastbound wire 0 <- cl_out[0] = eLUT 0

    for (int g = 0; g < G; g++)
      for (int a = 0; a < 64; a++)
        bits[g*64 + a] = cfg_word(g == 0 ? t0 : (g == 1 ? t1 : off), a);
  endtask

  task automatic load();
    @(negedge clk);
    begin_cfg = 1; idx = 0;
    @(negedge clk);
    begin_cfg = 0;
    while (!cfg_done) @(negedge clk);
    check(idx == G*64, "whole bitstream read");
  endtask

  // drive a 32-bit operand onto the edge wires chosen by place()
  task automatic apply(logic [31:0] x);
    in_e = '0; in_w = '0; in_n = '0; in_s = '0;
    for (int r = 0; r < ROWS; r++) in_e[r] = WD'({$urandom, $urandom});
    in_e[0] = '0;
    for (int b = 0; b < 28; b++)
      if (trk0[b] < WD) in_e[0][trk0[b]] = x[b];
      else in_n[0][trk0[b] - 2*WD] = x[b];
    for (int k = 0; k < 4; k++) in_n[1][trk1[k] - 2*WD] = x[28 + k];
  endtask

  task automatic try(bit is_and, logic [31:0] x, string tag);
    logic p, y;
    apply(x);
    #1;
    p = is_and ? &x[27:0] : |x[27:0];
    y = is_and ? &x : |x;
    check(out_e[0][PART_S + 2*S] == p, $sformatf("%s: 28-bit partial for %h", tag, x));
    check(out_e[0][S] == y, $sformatf("%s: 32-bit result for %h", tag, x));
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    place();
    for (int g = 0; g < 2; g++) begin
      bit is_and;
      string tag;
      is_and = (g == 0);
      tag = is_and ? "AND32" : "OR32";
      build(is_and);
      load();
      for (int v = 0; v < 100; v++) try(is_and, {$urandom}, tag);
      try(is_and, is_and ? 32'hFFFF_FFFF : 32'h0, tag);
      for (int b = 0; b < 32; b++)
        try(is_and, is_and ? ~(32'h1 << b) : (32'h1 << b), tag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
