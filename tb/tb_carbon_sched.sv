// tb_carbon_sched: scheduler modes.
//  - first go waits for all CGs to be done
//  - hard-deadline mode: go every cycle_len clocks; a go that finds the
//    array not done counts an overrun
//  - accelerator mode: go as soon as all_done is high
module tb_carbon_sched;
  logic clk = 0, rst = 1, run = 0, accel_mode = 0, all_done = 0, go;
  logic [9:0] cycle_len = 10'd7;
  logic [31:0] user_cycles, overruns;
  int checks = 0, failures = 0;
  int last_go, cyc = 0, n_go = 0, bad_gap = 0;

  carbon_sched #(.CNT_W(10)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  always @(negedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0; run = 1; all_done = 0;
    repeat (3) @(negedge clk);
    #1 check("no go before done", go === 1'b0);
    all_done = 1; #1;
    check("first go on done", go === 1'b1);
    last_go = cyc;
    @(negedge clk);
    // hard deadline: go every 7 clocks regardless of all_done
    for (int n = 0; n < 40; n++) begin
      #1;
      if (go) begin
        n_go++;
        if (cyc - last_go != 7) bad_gap++;
        last_go = cyc;
      end
      @(negedge clk);
    end
    check("periodic go count", n_go == 5 || n_go == 6);
    check("period is cycle_len", bad_gap == 0);
    check("no overrun while done", overruns == 0);
    // overrun: array not done when the deadline comes
    all_done = 0;
    repeat (8) @(negedge clk);
    check("overrun counted", overruns == 1);
    // accelerator mode: go follows all_done
    accel_mode = 1;
    @(negedge clk); #1;
    check("no go when not done", go === 1'b0);
    all_done = 1; #1;
    check("go when done", go === 1'b1);
    begin
      int u0; u0 = user_cycles;
      repeat (5) @(negedge clk);
      check("go every clock while done", user_cycles == u0 + 5);
    end
    run = 0; #1;
    check("no go when stopped", go === 1'b0);
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
