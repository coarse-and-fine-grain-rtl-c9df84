// tb_carbon_cg: one CG running a five-instruction schedule.
//   R0 = 5 ; R1 = 7 ; R2 = R0 + R1 ; R3 = R2 * W[0] ; out E[5] = R3, out N[2] = R2 (last)
// W[0] is written to 3 by the testbench acting as the west neighbour.
// Checks: results, that instruction k executes k+1 clocks after go (two-cycle
// fetch hidden), back-to-back user cycles, done/go handshake, and a Razor
// error injected into the R memory write of instruction 2: one stall cycle,
// stall sent to all four neighbours, correct results one clock late.
// A second program checks STORE: R[R0] = R1 with R0 = 9 writes R9, not the
// instruction's own R address.  A third checks LOAD (R2 = R[R3]) without a
// stall, with a stall on the instruction after the LOAD, and with a stall on
// the LOAD itself.
module tb_carbon_cg;
  import carbon_pkg::*;
  import carbon_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic imem_we = 0; logic [PC_W-1:0] imem_addr = '0; instr_t imem_wdata = '0;
  logic go = 0, done;
  logic [3:0] in_we = '0; addr_t [3:0] in_addr = '0; word_t [3:0] in_data = '0;
  word_t [4:0] err_inject = '0;
  logic [3:0] out_we; addr_t [3:0] out_addr; word_t [3:0] out_data;
  logic [3:0] stall_in = '0, stall_out;
  logic count_stall, exec; logic [PC_W-1:0] pc_e;
  int checks = 0, failures = 0;
  int n_stall = 0;

  carbon_cg dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (count_stall) n_stall++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  instr_t prog [5];
  word_t  exp_e = 32'd36, exp_n = 32'd12;
  int     inj_k = 3;

  // run one user cycle starting now; inject = corrupt R write of instr 2
  task automatic run_cycle(bit inject, int exp_out_at);
    int k; bit seen;
    seen = 0;
    go = 1;
    @(negedge clk);
    go = 0;
    for (k = 1; k <= 12; k++) begin
      // instruction 2 executes in the clock sampled at negedge 3
      err_inject[M_R] = (inject && k == inj_k) ? 32'h0000_0010 : '0;
      #1;
      if (out_we[M_E]) begin
        seen = 1;
        check("E write cycle", k == exp_out_at);
        check("E write addr", out_addr[M_E] == 4'd5);
        check("E write data", out_data[M_E] == exp_e);
        check("N write too", out_we[M_N] && out_addr[M_N] == 4'd2 && out_data[M_N] == exp_n);
        check("done while last executes", done === 1'b1);
      end
      if (inject && k == inj_k + 1) check("stall after error", count_stall === 1'b1);
      if (inject && k == inj_k + 2) check("stall sent to all neighbours", stall_out === 4'b1111);
      @(negedge clk);
      if (seen) break;
    end
    err_inject = '0;
    check("output produced", seen);
  endtask

  initial begin
    prog[0] = i_ldi(4'd0, 16'd5);
    prog[1] = i_ldi(4'd1, 16'd7);
    prog[2] = i_alu(OP_ADD, SRC_R, 4'd0, SRC_R, 4'd1, 4'd2);
    prog[3] = i_alu(OP_MUL, SRC_R, 4'd2, SRC_W, 4'd0, 4'd3);
    prog[4] = i_alu(OP_PASS, SRC_R, 4'd3, SRC_R, 4'd0, 4'd4);
    prog[4] = with_out(prog[4], M_E, 1'b0, 4'd5);
    prog[4] = with_out(prog[4], M_N, 1'b1, 4'd2);
    prog[4].x_sel = SRC_R; prog[4].x_addr = 4'd2;
    prog[4].last = 1'b1;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = PC_W'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    rst = 0;
    // west neighbour writes W[0] = 3
    in_we[M_W] = 1; in_addr[M_W] = 4'd0; in_data[M_W] = 32'd3;
    @(negedge clk);
    in_we = '0;
    repeat (3) @(negedge clk);
    check("done before first go", done === 1'b1);
    run_cycle(0, 5);
    // the testbench's go comes one clock after 'last': user cycle 2
    run_cycle(0, 5);
    check("no stall without error", n_stall == 0);
    run_cycle(1, 6);
    check("exactly one stall cycle", n_stall == 1);
    run_cycle(0, 5);
    // STORE: R[R0] = R1 with R0 = 9; r_addr (R0) must not be written
    prog[0] = i_ldi(4'd0, 16'd9);
    prog[1] = i_ldi(4'd1, 16'h77);
    prog[2] = i_alu(OP_STORE, SRC_R, 4'd0, SRC_R, 4'd1, 4'd0);
    prog[3] = i_nop();
    prog[4] = i_alu(OP_PASS, SRC_R, 4'd9, SRC_R, 4'd0, 4'd4);
    prog[4].r_we = 1'b0;
    prog[4] = with_out(prog[4], M_E, 1'b0, 4'd5);
    prog[4] = with_out(prog[4], M_N, 1'b1, 4'd2);
    prog[4].x_sel = SRC_R; prog[4].x_addr = 4'd0;
    prog[4].last = 1'b1;
    for (int i = 0; i < 5; i++) begin
      imem_we = 1; imem_addr = PC_W'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    exp_e = 32'h77; exp_n = 32'd9;
    run_cycle(0, 5);
    // LOAD: R2 = R[R3] with R3 = 9 (R9 = 0x77 from the STORE program);
    // the LOAD slot itself copies the address into R0
    prog[0] = i_ldi(4'd3, 16'd9);
    prog[1] = i_alu(OP_LOAD, SRC_R, 4'd3, SRC_R, 4'd0, 4'd0);
    prog[2] = i_alu(OP_PASS, SRC_R, 4'd0, SRC_R, 4'd0, 4'd2);
    prog[3] = i_nop();
    prog[4] = i_alu(OP_PASS, SRC_R, 4'd2, SRC_R, 4'd0, 4'd4);
    prog[4].r_we = 1'b0;
    prog[4] = with_out(prog[4], M_E, 1'b0, 4'd5);
    prog[4] = with_out(prog[4], M_N, 1'b1, 4'd2);
    prog[4].x_sel = SRC_R; prog[4].x_addr = 4'd0;
    prog[4].last = 1'b1;
    for (int i = 0; i < 5; i++) begin
      imem_we = 1; imem_addr = PC_W'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    run_cycle(0, 5);
    // error on the LOAD's own R write: the instruction after it stalls and
    // must repeat the indirect read
    inj_k = 2;
    run_cycle(1, 6);
    // error on the write before the LOAD: the LOAD itself stalls
    inj_k = 1;
    run_cycle(1, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
