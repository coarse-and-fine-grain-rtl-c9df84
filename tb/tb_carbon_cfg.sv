// tb_carbon_cfg: the instruction-memory write port decoder: one write per
// host word, one clock later, to the addressed CG only, or to all on
// broadcast.
module tb_carbon_cfg;
  import carbon_pkg::*;
  logic clk = 0, rst = 1;
  logic cfg_valid = 0, cfg_bcast = 0; logic [2:0] cfg_cg = '0;
  logic [PC_W-1:0] cfg_addr = '0; instr_t cfg_data = '0;
  logic [5:0] imem_we; logic [PC_W-1:0] imem_addr; instr_t imem_wdata;
  int checks = 0, failures = 0;

  carbon_cfg #(.NCG(6)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [2:0] cg; logic bc; logic [PC_W-1:0] a; instr_t d; logic v;
      cg = 3'($urandom_range(0, 5)); bc = ($urandom_range(0, 7) == 0); a = PC_W'($urandom);
      d = instr_t'({$urandom, $urandom, $urandom}); v = $urandom_range(0, 3) != 0;
      cfg_valid = v; cfg_bcast = bc; cfg_cg = cg; cfg_addr = a; cfg_data = d;
      @(negedge clk);
      check("we decode", imem_we === (!v ? 6'b0 : bc ? 6'b111111 : 6'(1) << cg));
      check("addr", imem_addr === a);
      check("data", imem_wdata === d);
    end
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
