// tb_carbon_stall_ctrl: checks the stall propagation rules of one CG against
// a reference model: stall on a memory error or a new neighbour stall, stall
// every neighbour one cycle later except the one(s) that asked, ignore a
// stall from a neighbour this CG is itself stalling, and keep the shadow
// reload on for the stall cycle and the one after.
// Directed cases first, then random stimulus against the model.
module tb_carbon_stall_ctrl;
  logic clk = 0, rst = 1;
  logic [4:0] mem_err = '0;
  logic [3:0] stall_in = '0, stall_out, load_shadow;
  logic load_shadow_r, count_stall;
  logic [3:0] m_out = '0;
  int checks = 0, failures = 0;

  carbon_stall_ctrl dut (.clk(clk), .rst(rst), .mem_err(mem_err), .stall_in(stall_in),
    .stall_out(stall_out), .load_shadow(load_shadow), .load_shadow_r(load_shadow_r),
    .count_stall(count_stall));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // reference model, evaluated at negedge after inputs are set
  logic [3:0] m_valid, m_nxt; logic m_cs;
  always_comb begin
    m_valid = stall_in & ~m_out;
    m_cs    = (|mem_err) | (|m_valid);
    m_nxt   = m_cs ? ~m_valid : 4'b0;
  end
  always @(posedge clk) m_out <= rst ? 4'b0 : m_nxt;

  task automatic step_check();
    #1;
    check("count_stall", count_stall === m_cs);
    check("stall_out", stall_out === m_out);
    check("load_shadow", load_shadow === (m_nxt | m_out));
    check("load_shadow_r", load_shadow_r === m_cs);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // own error: stall now, all four neighbours next cycle
    mem_err = 5'b10000; #1;
    check("error stalls", count_stall === 1'b1);
    check("error reloads all shadows", load_shadow === 4'b1111);
    @(negedge clk); mem_err = '0; #1;
    check("stall sent to all four", stall_out === 4'b1111);
    check("no second stall", count_stall === 1'b0);
    check("shadows still reloaded", load_shadow === 4'b1111);
    @(negedge clk); #1;
    check("stall_out clears", stall_out === 4'b0000);
    // stall from west (3): propagate to N, S, E only
    stall_in = 4'b1000; #1;
    check("neighbour stall", count_stall === 1'b1);
    check("no reload from requester", load_shadow === 4'b0111);
    @(negedge clk); stall_in = '0; #1;
    check("propagate away from origin", stall_out === 4'b0111);
    // two wavefronts meet: stalls from N and E at once
    @(negedge clk); stall_in = 4'b0101; #1;
    check("merged stall once", count_stall === 1'b1);
    @(negedge clk); #1;
    check("merge propagates to S and W", stall_out === 4'b1010);
    // neighbour that stalled in the same cycle: its echo is ignored
    stall_in = 4'b0010; #1;     // S answers while we are stalling S
    check("echo ignored", count_stall === 1'b0);
    stall_in = '0;
    @(negedge clk);
    // random against the model
    for (int n = 0; n < 3000; n++) begin
      mem_err  = ($urandom_range(0, 9) == 0) ? 5'($urandom) : 5'b0;
      stall_in = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'b0;
      step_check();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
