// tb_carbon_razor_study: the error-tolerance study of CARBON-Razor, run on
// the RTL: a 10x10 array (parameter override; the default is 2x2) running
// a ten-instruction schedule in compute-accelerator mode, so that every user
// cycle lasts exactly as long as the Razor stalls make it.
//
// Program (broadcast to every CG): i0 R0 = 3, i1 R1 = 4, i2..i9 R2..R5 =
// R0 + R1 in turn, last at i9.  Every instruction writes the R memory, so
// an error injected into the R memory write of any executing CG is a real
// timing error.  An injection counts as effective only if the CG executes
// in that clock (a stalled CG writes nothing).
//
// For m = 1..10 errors per user cycle, TRIALS user cycles each put m
// errors at random CGs in random clocks 1..8 of the cycle.  The extension
// E = user-cycle length - 10 is the number of spare cycles a hard deadline
// would have needed.  Checks, worked out from the stall rules alone:
//   1 <= E <= number of effective errors (an error stalls at least its own
//   CG once; each error can add at most one clock to any CG).
// Fixed scenarios with an exact answer:
//   A  five errors at five CGs in the same clock: the fronts merge, E = 1
//   B  three errors at one CG, three clocks apart: E = 3
//   C  errors at opposite corners, clocks 1 and 5: the second error occurs
//      before the first front reaches it, the fronts merge, E = 1
//   D  errors at two adjacent CGs, clocks 1 and 6: the second error comes
//      after the first front has passed, a second region, E = 2
// The table printed at the end gives, per m, the mean E and the fraction of
// user cycles that 1, 2 or 3 spare cycles would not have covered (the form
// of the published curves; the curves themselves are not compared).
`timescale 1ns/1ps
module tb_carbon_razor_study;
  import carbon_pkg::*;
  import carbon_tb_pkg::*;

  localparam int ROWS = 10, COLS = 10, NCG = ROWS*COLS, SL = 10, TRIALS = 50;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                   cfg_valid = 0, cfg_bcast = 0;
  logic [$clog2(NCG)-1:0] cfg_cg = '0;
  logic [PC_W-1:0]        cfg_addr = '0;
  instr_t                 cfg_data = '0;
  logic                   run = 0;
  logic                   go;
  logic [31:0]            user_cycles, overruns;
  logic [ROWS-1:0]        out_we_w, out_we_e;
  addr_t [ROWS-1:0]       out_addr_w, out_addr_e;
  word_t [ROWS-1:0]       out_data_w, out_data_e;
  logic [COLS-1:0]        out_we_n, out_we_s;
  addr_t [COLS-1:0]       out_addr_n, out_addr_s;
  word_t [COLS-1:0]       out_data_n, out_data_s;
  word_t [NCG-1:0][4:0]   err_inject;
  logic [NCG-1:0]         stalling, executing;

  carbon_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst(rst),
    .cfg_valid(cfg_valid), .cfg_bcast(cfg_bcast), .cfg_cg(cfg_cg), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data),
    .run(run), .accel_mode(1'b1), .cycle_len(10'd20), .go(go),
    .user_cycles(user_cycles), .overruns(overruns),
    .ext_in_we_w('0), .ext_in_we_e('0), .ext_in_addr_w('0),
    .ext_in_addr_e('0), .ext_in_data_w('0), .ext_in_data_e('0),
    .ext_in_we_n('0), .ext_in_we_s('0), .ext_in_addr_n('0),
    .ext_in_addr_s('0), .ext_in_data_n('0), .ext_in_data_s('0),
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

  task automatic clear_errors();
    for (int i = 0; i < NCG; i++)
      for (int j = 0; j < 5; j++) err_inject[i][j] = '0;
  endtask

  int cyc = 0;
  always @(negedge clk) cyc++;

  // wait for the next go, seen at a falling edge; returns its clock
  task automatic next_go(output int t);
    @(negedge clk); #1;
    while (!go) begin
      @(negedge clk); #1;
    end
    t = cyc;
  endtask

  // one user cycle: errors (clock k[e] after go, CG c[e]) on the R memory;
  // returns the extension and the number of effective errors
  int t_go;
  task automatic user_cycle(input int m, input int ks[], input int cs[],
                            output int ext, output int eff);
    int t_next;
    eff = 0;
    for (int k = 1; k <= 8; k++) begin
      @(negedge clk); #1;
      clear_errors();
      for (int e = 0; e < m; e++)
        if (ks[e] == k) begin
          if (executing[cs[e]] && err_inject[cs[e]][M_R] == '0) eff++;
          err_inject[cs[e]][M_R] = word_t'(32'h1 << (e % 32));
        end
    end
    @(negedge clk);
    clear_errors();
    next_go(t_next);
    ext = (t_next - t_go) - SL;
    t_go = t_next;
  endtask

  function automatic int idx(int r, int c);
    return r*COLS + c;
  endfunction

  int sum_e [11];
  int fail_e [11][4];

  initial begin
    instr_t prog [SL];
    int ks[], cs[];
    int ext, eff;
    prog[0] = i_ldi(0, 16'd3);
    prog[1] = i_ldi(1, 16'd4);
    for (int j = 2; j < SL; j++) prog[j] = i_alu(OP_ADD, SRC_R, 0, SRC_R, 1, addr_t'(2 + j % 4));
    prog[SL-1].last = 1'b1;
    clear_errors();

    repeat (3) @(negedge clk);
    rst = 0;
    for (int j = 0; j < SL; j++) begin
      cfg_valid = 1; cfg_bcast = 1; cfg_addr = PC_W'(j); cfg_data = prog[j];
      @(negedge clk);
    end
    cfg_valid = 0; cfg_bcast = 0;
    repeat (2) @(negedge clk);
    run = 1;
    next_go(t_go);

    // no errors: the user cycle is the schedule length
    user_cycle(0, ks, cs, ext, eff);
    check(ext == 0, "error-free user cycle lasts the schedule length");

    // A: five CGs, same clock
    ks = '{2, 2, 2, 2, 2};
    cs = '{idx(0, 0), idx(9, 9), idx(4, 5), idx(0, 9), idx(7, 2)};
    user_cycle(5, ks, cs, ext, eff);
    check(eff == 5 && ext == 1, $sformatf("A: simultaneous errors merge (E=%0d eff=%0d)", ext, eff));

    // B: one CG, three errors three clocks apart
    ks = '{1, 4, 7};
    cs = '{idx(5, 5), idx(5, 5), idx(5, 5)};
    user_cycle(3, ks, cs, ext, eff);
    check(eff == 3 && ext == 3, $sformatf("B: repeated errors at one CG (E=%0d eff=%0d)", ext, eff));

    // C: opposite corners, the second before the first front arrives
    ks = '{1, 5};
    cs = '{idx(0, 0), idx(9, 9)};
    user_cycle(2, ks, cs, ext, eff);
    check(eff == 2 && ext == 1, $sformatf("C: distant fronts merge (E=%0d eff=%0d)", ext, eff));

    // D: neighbours, the second after the first front has passed
    ks = '{1, 6};
    cs = '{idx(3, 3), idx(3, 4)};
    user_cycle(2, ks, cs, ext, eff);
    check(eff == 2 && ext == 2, $sformatf("D: second region (E=%0d eff=%0d)", ext, eff));

    // random study
    for (int m = 1; m <= 10; m++) begin
      sum_e[m] = 0;
      for (int e = 1; e <= 3; e++) fail_e[m][e] = 0;
      for (int t = 0; t < TRIALS; t++) begin
        ks = new[m];
        cs = new[m];
        foreach (ks[e]) begin
          ks[e] = 1 + int'($urandom_range(7));
          cs[e] = int'($urandom_range(NCG - 1));
        end
        user_cycle(m, ks, cs, ext, eff);
        check(eff >= 1 && ext >= 1 && ext <= eff,
              $sformatf("m=%0d: extension %0d with %0d effective errors", m, ext, eff));
        sum_e[m] += ext;
        for (int e = 1; e <= 3; e++) if (ext > e) fail_e[m][e]++;
      end
    end
    check(overruns == 0, "no overrun in accelerator mode");

    $display("errors  mean_spare_cycles  P(fail,e=1)  P(fail,e=2)  P(fail,e=3)   (%0d user cycles each)", TRIALS);
    for (int m = 1; m <= 10; m++)
      $display("%6d  %17.2f  %11.2f  %11.2f  %11.2f", m, real'(sum_e[m]) / TRIALS,
               real'(fail_e[m][1]) / TRIALS, real'(fail_e[m][2]) / TRIALS, real'(fail_e[m][3]) / TRIALS);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
