// tb_overlay_top: end-to-end testbench of overlay_top at its default sizes
// (no parameter override): a 3x3 ZUMA fabric and a 2x2 CARBON-Razor array,
// run side by side on one clock.  It is also the full-size testbench.
//
// ZUMA: a bitstream (9 tiles x 64 words) loads a circuit through the
// configuration controller: tile (0,0) computes a registered XOR of four
// eastbound wires, tile (2,2) a combinational inverter, all other routing
// is straight.  Edge buses are checked against a routing model every clock.
//
// CARBON: the 12-instruction schedule of tb_carbon_array is broadcast, then
// instruction 1 of CG(1,1) alone is rewritten (ADDI 9 instead of 5).  A
// model computes every east/south edge output per user cycle.  Timing
// errors are injected (one CG, a neighbour-written memory, two in one user
// cycle), accelerator mode is switched to hard-deadline mode, and a double
// error overruns the fixed user cycle.
//
// Each mechanism is counted; one that never happens counts as a failure.
`timescale 1ns/1ps
module tb_overlay_top;
  import carbon_pkg::*;
  import carbon_tb_pkg::*;
  import zuma_tb_pkg::*;

  localparam int ZR = 3, ZC = 3, ZG = ZR*ZC;
  localparam int CR = 2, CC = 2, NCG = CR*CC, SL = 12;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // ---------------- ZUMA signals ----------------
  logic                      z_begin = 0, z_bs_rd, z_done;
  logic [CFG_W-1:0]          z_bs_data;
  logic [ZR-1:0][WD-1:0]     z_in_e = '0, z_in_w = '0, z_out_e, z_out_w;
  logic [ZC-1:0][WD-1:0]     z_in_n = '0, z_in_s = '0, z_out_n, z_out_s;
  logic [ZG-1:0][N-1:0]      z_cl_out;
  // ---------------- CARBON signals ----------------
  logic                  cfg_valid = 0, cfg_bcast = 0;
  logic [1:0]            cfg_cg = '0;
  logic [PC_W-1:0]       cfg_addr = '0;
  instr_t                cfg_data = '0;
  logic                  run = 0, accel_mode = 1;
  logic [9:0]            cycle_len = 10'd13;
  logic                  go;
  logic [31:0]           user_cycles, overruns;
  logic [CR-1:0]         in_we_w, in_we_e, out_we_w, out_we_e;
  addr_t [CR-1:0]        in_addr_w, in_addr_e, out_addr_w, out_addr_e;
  word_t [CR-1:0]        in_data_w, in_data_e, out_data_w, out_data_e;
  logic [CC-1:0]         in_we_n, in_we_s, out_we_n, out_we_s;
  addr_t [CC-1:0]        in_addr_n, in_addr_s, out_addr_n, out_addr_s;
  word_t [CC-1:0]        in_data_n, in_data_s, out_data_n, out_data_s;
  word_t [NCG-1:0][4:0]  err_inject = '0;
  logic [NCG-1:0]        stalling, executing;

  overlay_top dut (
    .clk(clk), .rst(rst),
    .zuma_begin_cfg(z_begin), .zuma_bs_data(z_bs_data), .zuma_bs_rd(z_bs_rd),
    .zuma_cfg_done(z_done), .zuma_in_e(z_in_e), .zuma_in_w(z_in_w), .zuma_in_n(z_in_n),
    .zuma_in_s(z_in_s), .zuma_out_e(z_out_e), .zuma_out_w(z_out_w), .zuma_out_n(z_out_n),
    .zuma_out_s(z_out_s), .zuma_cl_out(z_cl_out),
    .carbon_cfg_valid(cfg_valid), .carbon_cfg_bcast(cfg_bcast), .carbon_cfg_cg(cfg_cg),
    .carbon_cfg_addr(cfg_addr), .carbon_cfg_data(cfg_data),
    .carbon_run(run), .carbon_accel_mode(accel_mode), .carbon_cycle_len(cycle_len),
    .carbon_go(go), .carbon_user_cycles(user_cycles), .carbon_overruns(overruns),
    .carbon_in_we_w(in_we_w), .carbon_in_we_e(in_we_e), .carbon_in_addr_w(in_addr_w),
    .carbon_in_addr_e(in_addr_e), .carbon_in_data_w(in_data_w), .carbon_in_data_e(in_data_e),
    .carbon_in_we_n(in_we_n), .carbon_in_we_s(in_we_s), .carbon_in_addr_n(in_addr_n),
    .carbon_in_addr_s(in_addr_s), .carbon_in_data_n(in_data_n), .carbon_in_data_s(in_data_s),
    .carbon_out_we_w(out_we_w), .carbon_out_we_e(out_we_e), .carbon_out_addr_w(out_addr_w),
    .carbon_out_addr_e(out_addr_e), .carbon_out_data_w(out_data_w), .carbon_out_data_e(out_data_e),
    .carbon_out_we_n(out_we_n), .carbon_out_we_s(out_we_s), .carbon_out_addr_n(out_addr_n),
    .carbon_out_addr_s(out_addr_s), .carbon_out_data_n(out_data_n), .carbon_out_data_s(out_data_s),
    .carbon_err_inject(err_inject), .carbon_stalling(stalling), .carbon_executing(executing)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int {
    Z_BITSTREAM_WORD, Z_HELD_WHILE_LOADING, Z_REGISTERED_EBLE, Z_COMBINATIONAL_EBLE,
    Z_STAGGERED_WIRE, C_BROADCAST_WRITE, C_SINGLE_CG_WRITE, C_GO_ACCELERATOR,
    C_GO_HARD_DEADLINE, C_MODE_SWITCH, C_TIMING_ERROR, C_STALL_OWN, C_STALL_FROM_NEIGHBOUR,
    C_DELAYED_WRITE, C_PENDING_WRITE, C_BYPASS, C_OVERRUN, NMECH
  } mech_e;
  int mech [NMECH];
  initial foreach (mech[i]) mech[i] = 0;

  always @(negedge clk) if (!rst) begin
    if (z_bs_rd) mech[Z_BITSTREAM_WORD]++;
    if (cfg_valid && cfg_bcast) mech[C_BROADCAST_WRITE]++;
    if (cfg_valid && !cfg_bcast) mech[C_SINGLE_CG_WRITE]++;
    if (go && accel_mode) mech[C_GO_ACCELERATOR]++;
    if (go && !accel_mode) mech[C_GO_HARD_DEADLINE]++;
  end

  for (genvar r = 0; r < CR; r++) begin : g_r
    for (genvar c = 0; c < CC; c++) begin : g_c
      for (genvar m = 0; m < 5; m++) begin : g_m
        always @(negedge clk) if (!rst) begin
          if (dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.mem_err) mech[C_TIMING_ERROR]++;
          if (dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.pend_q) mech[C_PENDING_WRITE]++;
          if (m != M_R && dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.we &&
              dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.load_shadow)
            mech[C_DELAYED_WRITE]++;
          for (int p = 0; p < 3; p++)
            if (dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.byp_v &&
                dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.byp_addr ==
                dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.raddr_q[p] &&
                dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.byp_data !=
                dut.u_carbon.g_row[r].g_col[c].u_cg.g_mem[m].u_mem.ram_q[p])
              mech[C_BYPASS]++;
        end
      end
      always @(negedge clk) if (!rst && stalling[r*CC + c]) begin
        if (|dut.u_carbon.g_row[r].g_col[c].u_cg.mem_err) mech[C_STALL_OWN]++;
        else mech[C_STALL_FROM_NEIGHBOUR]++;
      end
    end
  end

  // ======================= ZUMA =======================
  logic [CFG_W-1:0] bits [ZG*64];
  int zidx = 0;
  assign z_bs_data = bits[zidx < ZG*64 ? zidx : 0];
  always @(posedge clk) if (z_bs_rd) zidx <= zidx + 1;
  logic xq, last_x;
  bit   zuma_ok = 0;

  function automatic tile_cfg_t straight();
    tile_cfg_t t;
    t = cfg_off();
    foreach (t.sb[i]) t.sb[i] = 0;
    return t;
  endfunction

  function automatic logic [WD-1:0] ztile(int g, int d, logic [WD-1:0] b);
    logic [WD-1:0] y;
    y[WD-1:S] = b[WD-S-1:0];
    for (int s = 0; s < S; s++) y[s] = b[WD-S+s];
    if (g == 0 && d == 0) y[0] = xq;
    if (g == ZG-1 && d == 0) y[0] = ~b[0];
    return y;
  endfunction

  task automatic zuma_inputs();
    for (int r = 0; r < ZR; r++) begin
      z_in_e[r] = WD'({$urandom, $urandom}); z_in_w[r] = WD'({$urandom, $urandom});
    end
    for (int c = 0; c < ZC; c++) begin
      z_in_n[c] = WD'({$urandom, $urandom}); z_in_s[c] = WD'({$urandom, $urandom});
    end
  endtask

  task automatic zuma_check();
    for (int r = 0; r < ZR; r++) begin
      logic [WD-1:0] be, bw;
      be = z_in_e[r]; bw = z_in_w[r];
      for (int c = 0; c < ZC; c++) be = ztile(r*ZC + c, 0, be);
      for (int c = ZC-1; c >= 0; c--) bw = ztile(r*ZC + c, 1, bw);
      check(z_out_e[r] == be, $sformatf("ZUMA east edge row %0d", r));
      check(z_out_w[r] == bw, $sformatf("ZUMA west edge row %0d", r));
    end
    for (int c = 0; c < ZC; c++) begin
      logic [WD-1:0] bn, bs;
      bn = z_in_n[c]; bs = z_in_s[c];
      for (int r = 0; r < ZR; r++) bn = ztile(r*ZC + c, 2, bn);
      for (int r = ZR-1; r >= 0; r--) bs = ztile(r*ZC + c, 3, bs);
      check(z_out_n[c] == bn, $sformatf("ZUMA north edge col %0d", c));
      check(z_out_s[c] == bs, $sformatf("ZUMA south edge col %0d", c));
    end
    mech[Z_STAGGERED_WIRE]++;
  endtask

  initial begin : zuma_run
    tile_cfg_t t;
    int n;
    for (int g = 0; g < ZG; g++) begin
      t = straight();
      if (g == 0) begin
        for (int j = 0; j < 4; j++) begin
          t.ib[j] = 0; t.s1[0][j] = j; t.s2[j][0] = 0;
        end
        for (int a = 0; a < 64; a++) t.lut[0][a] = ^a[3:0];
        t.mode[0] = 1;
        t.sb[0] = 3;
      end
      if (g == ZG-1) begin
        t.ib[0] = 0; t.s1[0][0] = 0; t.s2[0][0] = 0;
        t.lut[0] = 64'h5555_5555_5555_5555;
        t.sb[0] = 3;
      end
      for (int a = 0; a < 64; a++) bits[g*64 + a] = cfg_word(t, a);
    end
    wait (!rst);
    @(negedge clk);
    z_begin = 1; zidx = 0;
    @(negedge clk);
    z_begin = 0;
    n = 0;
    while (!z_done && n < ZG*64 + 10) begin
      zuma_inputs();
      last_x = z_in_e[0][0] ^ z_in_e[0][8] ^ z_in_e[0][16] ^ z_in_e[0][24];
      #1;
      check(z_cl_out == '0 && z_out_e[0][0 +: ZC*S] == '0, "ZUMA outputs held at 0 while loading");
      mech[Z_HELD_WHILE_LOADING]++;
      @(negedge clk);
      n++;
    end
    check(n == ZG*64, $sformatf("ZUMA configuration took %0d clocks, expected %0d", n, ZG*64));
    xq = last_x;
    for (int v = 0; v < 300; v++) begin
      logic nxt;
      zuma_inputs();
      #1;
      zuma_check();
      if (z_out_e[0][2*S] == 1'b1) mech[Z_REGISTERED_EBLE]++;
      if (z_cl_out[ZG-1][0] == 1'b1 && z_out_e[ZR-1][0] == 1'b1) mech[Z_COMBINATIONAL_EBLE]++;
      nxt = z_in_e[0][0] ^ z_in_e[0][8] ^ z_in_e[0][16] ^ z_in_e[0][24];
      @(negedge clk);
      xq = nxt;
    end
    zuma_ok = 1;
  end

  // ======================= CARBON =======================
  function automatic word_t ext_w(int u, int r);
    return word_t'(u*37 + r*1000 + 5);
  endfunction
  function automatic int imm_of(int r, int c);
    return (r == 1 && c == 1) ? 9 : 5;
  endfunction

  logic setup_we = 0;
  always_comb begin
    for (int r = 0; r < CR; r++) begin
      in_we_w[r]   = go | setup_we;
      in_addr_w[r] = setup_we ? addr_t'(1) : addr_t'(0);
      in_data_w[r] = setup_we ? word_t'(7) : ext_w(int'(user_cycles), r);
    end
    for (int c = 0; c < CC; c++) begin
      in_we_n[c] = setup_we; in_addr_n[c] = '0; in_data_n[c] = word_t'(1000 + c);
    end
    in_we_e = '0; in_addr_e = '0; in_data_e = '0;
    in_we_s = '0; in_addr_s = '0; in_data_s = '0;
  end

  word_t east_q [CR][$];
  word_t south_q[CC][$];
  bit    recording = 1;
  always @(negedge clk) if (!rst && recording) begin
    for (int r = 0; r < CR; r++)
      if (out_we_e[r] && out_addr_e[r] == 0) east_q[r].push_back(out_data_e[r]);
    for (int c = 0; c < CC; c++)
      if (out_we_s[c]) south_q[c].push_back(out_data_s[c]);
  end

  int go_t[$];
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    #2;
    if (go) go_t.push_back(cyc);
  end

  task automatic wait_go(int u);
    @(negedge clk); #1;
    while (!(go && int'(user_cycles) == u)) begin
      @(negedge clk); #1;
    end
  endtask

  task automatic run_errors(int k1, int idx1, int m1, int k2, int idx2, int m2);
    for (int k = 1; k <= 16; k++) begin
      @(negedge clk);
      err_inject = '0;
      if (k == k1) err_inject[idx1][m1] = 32'h0000_0400;
      if (k == k2) err_inject[idx2][m2] = 32'h0002_0000;
    end
    err_inject = '0;
  endtask

  instr_t prog [SL];
  bit carbon_ok = 0;

  initial begin : carbon_run
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

    repeat (3) @(negedge clk);
    rst = 0;
    for (int j = 0; j < SL; j++) begin
      cfg_valid = 1; cfg_bcast = 1; cfg_addr = PC_W'(j); cfg_data = prog[j];
      @(negedge clk);
    end
    cfg_bcast = 0; cfg_cg = 2'd3; cfg_addr = PC_W'(1);
    cfg_data = prog[1]; cfg_data.imm = 16'd9;
    @(negedge clk);
    cfg_valid = 0;
    setup_we = 1;
    @(negedge clk);
    setup_we = 0;
    repeat (3) @(negedge clk);
    run = 1;

    wait_go(6);                                  // own R memory error in CG0
    run_errors(2, 0, M_R, 0, 0, 0);
    wait_go(9);                                  // CG3's W memory, written by CG2's i2
    run_errors(3, 3, M_W, 0, 0, 0);
    wait_go(12);                                 // two errors in CG0
    run_errors(2, 0, M_R, 8, 0, M_R);
    wait_go(15);
    repeat (2) @(negedge clk);
    accel_mode = 0;                              // hard-deadline mode, 12 + 1 spare
    mech[C_MODE_SWITCH]++;
    wait_go(18);
    run_errors(2, 1, M_R, 0, 0, 0);
    check(overruns == 0, "one error within the spare cycle: no overrun");
    wait_go(21);
    recording = 0;
    run_errors(2, 0, M_R, 8, 0, M_R);
    wait_go(23);
    check(overruns >= 1, "two errors in one hard-deadline user cycle overrun");
    if (overruns >= 1) mech[C_OVERRUN]++;
    for (int u = 1; u < 15; u++) begin
      int exp_g;
      exp_g = SL + (u == 6 || u == 9 ? 1 : (u == 12 ? 2 : 0));
      check(go_t[u+1] - go_t[u] == exp_g, $sformatf("accelerator user cycle %0d: %0d clocks, expected %0d",
                                                    u, go_t[u+1] - go_t[u], exp_g));
    end
    for (int u = 16; u < 21; u++)
      check(go_t[u+1] - go_t[u] == 13, $sformatf("hard-deadline user cycle %0d: %0d clocks", u,
                                                 go_t[u+1] - go_t[u]));
    begin
      longint e_prev [CR][CC], s_prev [CR][CC], e_cur [CR][CC], s_cur [CR][CC], r2 [CR][CC];
      bit     ek_prev[CR][CC], sk_prev[CR][CC], ek_cur[CR][CC], sk_cur[CR][CC], r2k[CR][CC];
      int nu, compared;
      compared = 0;
      nu = east_q[0].size();
      check(nu >= 20, $sformatf("%0d CARBON user cycles recorded", nu));
      for (int r = 0; r < CR; r++) begin
        check(east_q[r].size() == nu, "east output count per row");
        for (int c = 0; c < CC; c++) begin ek_prev[r][c] = 0; sk_prev[r][c] = 0; end
      end
      for (int c = 0; c < CC; c++) check(south_q[c].size() == nu, "south output count per column");
      for (int u = 0; u < nu; u++) begin
        for (int r = 0; r < CR; r++)
          for (int c = 0; c < CC; c++) begin
            longint w0, n0, w1, r0, r1;
            bit kw0, kn0, kw1;
            if (c == 0) begin w0 = longint'(ext_w(u, r)); kw0 = 1; end
            else begin w0 = e_prev[r][c-1]; kw0 = ek_prev[r][c-1]; end
            if (r == 0) begin n0 = 64'(1000 + c); kn0 = 1; end
            else begin n0 = s_prev[r-1][c]; kn0 = sk_prev[r-1][c]; end
            if (c == 0) begin w1 = 7; kw1 = 1; end
            else begin w1 = r2[r][c-1]; kw1 = r2k[r][c-1]; end
            r0 = (w0 + n0) & 64'hFFFF_FFFF;
            r1 = (r0 + longint'(imm_of(r, c))) & 64'hFFFF_FFFF;
            r2[r][c] = r1 ^ r0; r2k[r][c] = kw0 & kn0;
            e_cur[r][c] = (r2[r][c] + w1) & 64'hFFFF_FFFF; ek_cur[r][c] = kw0 & kn0 & kw1;
            s_cur[r][c] = r1; sk_cur[r][c] = kw0 & kn0;
          end
        for (int r = 0; r < CR; r++)
          if (ek_cur[r][CC-1]) begin
            compared++;
            check(east_q[r][u] == word_t'(e_cur[r][CC-1]),
                  $sformatf("CARBON east row %0d user cycle %0d", r, u));
          end
        for (int c = 0; c < CC; c++)
          if (sk_cur[CR-1][c]) begin
            compared++;
            check(south_q[c][u] == word_t'(s_cur[CR-1][c]),
                  $sformatf("CARBON south col %0d user cycle %0d", c, u));
          end
        e_prev = e_cur; s_prev = s_cur; ek_prev = ek_cur; sk_prev = sk_cur;
      end
      check(compared > 60, $sformatf("%0d CARBON edge outputs compared", compared));
    end
    carbon_ok = 1;
  end

  // ---------------- end ----------------
  initial begin
    wait (zuma_ok && carbon_ok);
    for (int i = 0; i < NMECH; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-24s happened %0d times", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
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
