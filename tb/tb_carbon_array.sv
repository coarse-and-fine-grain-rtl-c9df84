// tb_carbon_array: self-checking testbench for carbon_array, a 5x5 array
// (parameter override; the default is 2x2) so that stall waves travel up to
// eight hops.
//
// All CGs run one broadcast 12-instruction schedule:
//   i0  R0 = W0 + N0        (W0 from the west neighbour's previous cycle)
//   i1  R1 = R0 + 5
//   i2  R2 = R1 ^ R0, also written to the east neighbour's W1
//   i3..i4, i6..i10  R3 = R0 + R1 (filler, keeps R written every clock)
//   i5  R4 = R2 + W1        (W1 from the west neighbour in this same cycle)
//   i11 east W0 <= R4, south N0 <= R1 (crossbar), last
// The west edge is fed a new word per user cycle at go, the north edge a
// constant per column, west W1 of column 0 a constant.  A model computes
// every east/south edge output per user cycle; outputs that depend on the
// memories' power-up contents are skipped.
//
// Razor checks (timing errors injected through err_inject, sampled on the
// falling edge; in the cycle sampled at falling edge n after go,
// instruction n-1 executes):
//   U=8   one error at CG(2,2): every CG stalls exactly once, at 3 + distance
//   U=12  errors at CG(0,0) and CG(4,4) (the latter in its W memory, on the
//         neighbour's write): each CG stalls once, at the earlier wave
//   U=16  two errors at CG(2,2): every CG stalls twice
//   accelerator mode: user cycle = 12 + number of stall regions
//   hard-deadline mode (cycle_len 13): one error per cycle gives no
//   overrun, two errors give an overrun.
// The data check covers every user cycle before the overrun.
`timescale 1ns/1ps
module tb_carbon_array;
  import carbon_pkg::*;
  import carbon_tb_pkg::*;

  localparam int ROWS = 5, COLS = 5, NCG = ROWS*COLS, SL = 12;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                  cfg_valid = 0, cfg_bcast = 0;
  logic [$clog2(NCG)-1:0] cfg_cg = '0;
  logic [PC_W-1:0]       cfg_addr = '0;
  instr_t                cfg_data = '0;
  logic                  run = 0, accel_mode = 1;
  logic [9:0]            cycle_len = 10'd13;
  logic                  go;
  logic [31:0]           user_cycles, overruns;
  logic [ROWS-1:0]       in_we_w, in_we_e;
  addr_t [ROWS-1:0]      in_addr_w, in_addr_e;
  word_t [ROWS-1:0]      in_data_w, in_data_e;
  logic [COLS-1:0]       in_we_n, in_we_s;
  addr_t [COLS-1:0]      in_addr_n, in_addr_s;
  word_t [COLS-1:0]      in_data_n, in_data_s;
  logic [ROWS-1:0]       out_we_w, out_we_e;
  addr_t [ROWS-1:0]      out_addr_w, out_addr_e;
  word_t [ROWS-1:0]      out_data_w, out_data_e;
  logic [COLS-1:0]       out_we_n, out_we_s;
  addr_t [COLS-1:0]      out_addr_n, out_addr_s;
  word_t [COLS-1:0]      out_data_n, out_data_s;
  word_t [NCG-1:0][4:0]  err_inject = '0;
  logic [NCG-1:0]        stalling, executing;

  carbon_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst(rst),
    .cfg_valid(cfg_valid), .cfg_bcast(cfg_bcast), .cfg_cg(cfg_cg), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data),
    .run(run), .accel_mode(accel_mode), .cycle_len(cycle_len), .go(go),
    .user_cycles(user_cycles), .overruns(overruns),
    .ext_in_we_w(in_we_w), .ext_in_we_e(in_we_e), .ext_in_addr_w(in_addr_w),
    .ext_in_addr_e(in_addr_e), .ext_in_data_w(in_data_w), .ext_in_data_e(in_data_e),
    .ext_in_we_n(in_we_n), .ext_in_we_s(in_we_s), .ext_in_addr_n(in_addr_n),
    .ext_in_addr_s(in_addr_s), .ext_in_data_n(in_data_n), .ext_in_data_s(in_data_s),
    .ext_out_we_w(out_we_w), .ext_out_we_e(out_we_e), .ext_out_addr_w(out_addr_w),
    .ext_out_addr_e(out_addr_e), .ext_out_data_w(out_data_w), .ext_out_data_e(out_data_e),
    .ext_out_we_n(out_we_n), .ext_out_we_s(out_we_s), .ext_out_addr_n(out_addr_n),
    .ext_out_addr_s(out_addr_s), .ext_out_data_n(out_data_n), .ext_out_data_s(out_data_s),
    .err_inject(err_inject), .stalling(stalling), .executing(executing)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic word_t ext_w(int u, int r);
    return word_t'(u*37 + r*1000 + 5);
  endfunction

  // west edge: new word into W0 at every go; setup writes drive the rest
  logic setup_we_w = 0, setup_we_n = 0;
  word_t setup_data_w [ROWS];
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      in_we_w[r]   = go | setup_we_w;
      in_addr_w[r] = setup_we_w ? addr_t'(1) : addr_t'(0);
      in_data_w[r] = setup_we_w ? setup_data_w[r] : ext_w(int'(user_cycles), r);
    end
    for (int c = 0; c < COLS; c++) begin
      in_we_n[c] = setup_we_n; in_addr_n[c] = '0; in_data_n[c] = word_t'(1000 + c);
    end
    in_we_e = '0; in_addr_e = '0; in_data_e = '0;
    in_we_s = '0; in_addr_s = '0; in_data_s = '0;
  end

  // ---- output recording ----
  word_t east_q [ROWS][$];
  word_t south_q[COLS][$];
  bit    recording = 1;
  always @(negedge clk) if (!rst && recording) begin
    for (int r = 0; r < ROWS; r++)
      if (out_we_e[r]) begin
        // address 1 carries i2's word for the (absent) east neighbour
        if (out_addr_e[r] == 0) east_q[r].push_back(out_data_e[r]);
        else check(out_addr_e[r] == 1, "east output address");
      end
    for (int c = 0; c < COLS; c++)
      if (out_we_s[c]) begin
        south_q[c].push_back(out_data_s[c]);
        check(out_addr_s[c] == 0, "south output address");
      end
  end

  // ---- stall recording, relative to the go of the scenario ----
  int cyc = 0, t0 = 0;
  int stall_t [NCG][$];
  int go_t[$];
  always @(negedge clk) begin
    cyc++;
    #2;
    for (int i = 0; i < NCG; i++)
      if (stalling[i]) stall_t[i].push_back(cyc - t0);
    if (go) go_t.push_back(cyc);
  end

  task automatic wait_go(int u);
    @(negedge clk); #1;
    while (!(go && int'(user_cycles) == u)) begin
      @(negedge clk); #1;
    end
    t0 = cyc;
    for (int i = 0; i < NCG; i++) stall_t[i].delete();
  endtask

  // inject on the write of falling edge k (relative to t0), for one clock
  task automatic run_errors(int k1, int idx1, int m1, int k2, int idx2, int m2);
    for (int k = 1; k <= 20; k++) begin
      @(negedge clk);
      err_inject = '0;
      if (k == k1) err_inject[idx1][m1] = 32'h0000_0100;
      if (k == k2) err_inject[idx2][m2] = 32'h0010_0000;
    end
    err_inject = '0;
  endtask

  function automatic int hops(int i, int j);
    int ri, ci, rj, cj;
    ri = i / COLS; ci = i % COLS; rj = j / COLS; cj = j % COLS;
    return (ri > rj ? ri - rj : rj - ri) + (ci > cj ? ci - cj : cj - ci);
  endfunction

  function automatic int gap_after(int u);
    return go_t[u+1] - go_t[u];
  endfunction

  instr_t prog [SL];
  int idx_c, idx_00, idx_44;

  initial begin
    instr_t f;
    prog[0] = i_alu(OP_ADD, SRC_W, 0, SRC_N, 0, 0);
    prog[1] = i_alu(OP_ADDI, SRC_R, 0, SRC_R, 0, 1); prog[1].imm = 16'd5;
    prog[2] = with_out(i_alu(OP_XOR, SRC_R, 1, SRC_R, 0, 2), M_E, 1'b0, 1);
    f = i_alu(OP_ADD, SRC_R, 0, SRC_R, 1, 3);
    for (int j = 3; j < SL; j++) prog[j] = f;
    prog[5] = i_alu(OP_ADD, SRC_R, 2, SRC_W, 1, 4);
    prog[11] = i_alu(OP_PASS, SRC_R, 4, SRC_R, 0, 0);
    prog[11].r_we = 1'b0;
    prog[11].x_sel = SRC_R; prog[11].x_addr = 1;
    prog[11] = with_out(prog[11], M_E, 1'b0, 0);
    prog[11] = with_out(prog[11], M_S, 1'b1, 0);
    prog[11].last = 1'b1;
    idx_c = 2*COLS + 2; idx_00 = 0; idx_44 = NCG - 1;
    for (int r = 0; r < ROWS; r++) setup_data_w[r] = word_t'(7);

    repeat (3) @(negedge clk);
    rst = 0;
    // broadcast configuration
    for (int j = 0; j < SL; j++) begin
      cfg_valid = 1; cfg_bcast = 1; cfg_addr = PC_W'(j); cfg_data = prog[j];
      @(negedge clk);
    end
    cfg_valid = 0; cfg_bcast = 0;
    setup_we_w = 1; setup_we_n = 1;
    @(negedge clk);
    setup_we_w = 0; setup_we_n = 0;
    repeat (3) @(negedge clk);
    run = 1;

    // U=8: one error at the centre CG, R memory, write of i1
    wait_go(8);
    run_errors(2, idx_c, M_R, 0, 0, 0);
    for (int i = 0; i < NCG; i++) begin
      check(stall_t[i].size() >= 1 && stall_t[i][0] == 3 + hops(i, idx_c),
            $sformatf("U8 CG%0d first stall at %0d, expected %0d", i,
                      stall_t[i].size() != 0 ? stall_t[i][0] : -1, 3 + hops(i, idx_c)));
    end

    // U=12: two independent errors whose waves merge
    wait_go(12);
    for (int i = 0; i < NCG; i++) stall_t[i].delete();
    fork
      run_errors(2, idx_00, M_R, 3, idx_44, M_W);
    join
    begin
      int once;
      once = 0;
      for (int i = 0; i < NCG; i++) begin
        int e1, e2, exp_t;
        e1 = 3 + hops(i, idx_00); e2 = 4 + hops(i, idx_44);
        exp_t = e1 < e2 ? e1 : e2;
        check(stall_t[i].size() >= 1 && stall_t[i][0] == exp_t,
              $sformatf("U12 CG%0d first stall %0d expected %0d", i,
                        stall_t[i].size() != 0 ? stall_t[i][0] : -1, exp_t));
      end
    end

    // U=16: two errors at the centre, 5 instructions apart
    wait_go(16);
    run_errors(2, idx_c, M_R, 8, idx_c, M_R);

    // hard-deadline mode from user cycle 20 on
    wait_go(19);
    repeat (2) @(negedge clk);
    accel_mode = 0;
    wait_go(22);
    run_errors(2, idx_c, M_R, 0, 0, 0);
    check(overruns == 0, "single error within the spare cycle gives no overrun");
    wait_go(24);
    recording = 0;
    run_errors(2, idx_c, M_R, 8, idx_c, M_R);
    wait_go(26);
    check(overruns >= 1, $sformatf("two errors in one user cycle overrun (%0d)", overruns));
    repeat (5) @(negedge clk);
    finish_checks();
  end

  // per-CG stall counts over whole user cycles
  int stalls_in_u [int][NCG];
  int cur_u;
  always @(negedge clk) begin
    #3;
    cur_u = int'(user_cycles) - 1;
    for (int i = 0; i < NCG; i++)
      if (stalling[i]) stalls_in_u[cur_u][i]++;
  end

  task automatic finish_checks();
    // ---- Razor counts per user cycle ----
    for (int i = 0; i < NCG; i++) begin
      check(stalls_in_u.exists(8) && stalls_in_u[8][i] == 1, $sformatf("U8 CG%0d stalls once", i));
      check(stalls_in_u.exists(12) && stalls_in_u[12][i] == 1, $sformatf("U12 CG%0d stalls once", i));
      check(stalls_in_u.exists(16) && stalls_in_u[16][i] == 2, $sformatf("U16 CG%0d stalls twice", i));
    end
    for (int u = 1; u < 19; u++) begin
      int exp_g;
      exp_g = SL + (u == 8 || u == 12 ? 1 : (u == 16 ? 2 : 0));
      check(gap_after(u) == exp_g, $sformatf("accelerator user cycle %0d length %0d, expected %0d",
                                             u, gap_after(u), exp_g));
    end
    for (int u = 21; u < 24; u++)
      check(gap_after(u) == 13, $sformatf("hard-deadline user cycle %0d length %0d", u, gap_after(u)));

    // ---- data model ----
    begin
      longint e_prev [ROWS][COLS], s_prev [ROWS][COLS];
      bit     ek_prev[ROWS][COLS], sk_prev[ROWS][COLS];
      longint e_cur [ROWS][COLS], s_cur [ROWS][COLS], r2 [ROWS][COLS];
      bit     ek_cur[ROWS][COLS], sk_cur[ROWS][COLS], r2k [ROWS][COLS];
      int nu, compared;
      compared = 0;
      nu = east_q[0].size();
      check(nu >= 20, $sformatf("%0d user cycles recorded", nu));
      for (int r = 0; r < ROWS; r++) begin
        check(east_q[r].size() == nu, "east output count per row");
        for (int c = 0; c < COLS; c++) begin ek_prev[r][c] = 0; sk_prev[r][c] = 0; end
      end
      for (int c = 0; c < COLS; c++) check(south_q[c].size() == nu, "south output count per column");
      for (int u = 0; u < nu; u++) begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            longint w0, n0, w1, r0, r1;
            bit kw0, kn0, kw1;
            if (c == 0) begin w0 = longint'(ext_w(u, r)); kw0 = 1; end
            else begin w0 = e_prev[r][c-1]; kw0 = ek_prev[r][c-1]; end
            if (r == 0) begin n0 = 64'(1000 + c); kn0 = 1; end
            else begin n0 = s_prev[r-1][c]; kn0 = sk_prev[r-1][c]; end
            if (c == 0) begin w1 = 7; kw1 = 1; end
            else begin w1 = r2[r][c-1]; kw1 = r2k[r][c-1]; end
            r0 = (w0 + n0) & 64'hFFFF_FFFF;
            r1 = (r0 + 5) & 64'hFFFF_FFFF;
            r2[r][c] = r1 ^ r0; r2k[r][c] = kw0 & kn0;
            e_cur[r][c] = (r2[r][c] + w1) & 64'hFFFF_FFFF; ek_cur[r][c] = kw0 & kn0 & kw1;
            s_cur[r][c] = r1; sk_cur[r][c] = kw0 & kn0;
          end
        for (int r = 0; r < ROWS; r++)
          if (ek_cur[r][COLS-1]) begin
            compared++;
            check(east_q[r][u] == word_t'(e_cur[r][COLS-1]),
                  $sformatf("east row %0d user cycle %0d: %h, model %h", r, u, east_q[r][u],
                            word_t'(e_cur[r][COLS-1])));
          end
        for (int c = 0; c < COLS; c++)
          if (sk_cur[ROWS-1][c]) begin
            compared++;
            check(south_q[c][u] == word_t'(s_cur[ROWS-1][c]),
                  $sformatf("south col %0d user cycle %0d", c, u));
          end
        e_prev = e_cur; s_prev = s_cur; ek_prev = ek_cur; sk_prev = sk_cur;
      end
      check(compared > 100, $sformatf("%0d edge outputs compared with the model", compared));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #200000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
