// tb_zuma_iib: self-checking testbench for zuma_iib, the two-stage
// crossbar internal interconnect, at the default k = 6, N = 8, I = 28
// (six 6x6 first-stage and six 6x8 second-stage crossbars).
// Random crossbar settings are loaded through the configuration port; for
// random inputs every eLUT input is compared with the reference model of
// zuma_tb_pkg.  A routing case then checks that all 36 inputs reach eLUT
// inputs (input p*K+j through first-stage output j to second-stage
// crossbar j), as the Clos-style network allows.
`timescale 1ns/1ps
module tb_zuma_iib;
  import zuma_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                 cfg_we = 0;
  logic [K-1:0]         cfg_addr = '0;
  logic [P*K+K*N-1:0]   cfg_data = '0;
  logic [I+N-1:0]       in = '0;
  logic [N*K-1:0]       lut_in;

  zuma_iib dut (.clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
                .in(in), .lut_in(lut_in));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic configure(tile_cfg_t t);
    for (int a = 0; a < 64; a++) begin
      logic [CFG_W-1:0] w;
      w = cfg_word(t, a);
      @(negedge clk);
      cfg_we = 1; cfg_addr = K'(a); cfg_data = w[O_IIB +: P*K + K*N];
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    tile_cfg_t t;
    for (int rep = 0; rep < 8; rep++) begin
      t = cfg_random();
      configure(t);
      for (int v = 0; v < 200; v++) begin
        in = (I+N)'({$urandom, $urandom});
        #1;
        check(lut_in == iib_model(t, in), $sformatf("config %0d vector %0d", rep, v));
      end
    end
    // every input routed: first stage identity, second stage passes
    // first-stage crossbar p to eLUT n = p (n < P)
    t = cfg_off();
    foreach (t.s1[p, j]) t.s1[p][j] = j;
    for (int j = 0; j < K; j++)
      for (int n = 0; n < P; n++) t.s2[j][n] = n;
    configure(t);
    for (int b = 0; b < I + N; b++) begin
      in = '0; in[b] = 1'b1;
      #1;
      check(lut_in == (N*K)'(1) << ((b / K) * K + (b % K)), $sformatf("input %0d routed", b));
    end
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
