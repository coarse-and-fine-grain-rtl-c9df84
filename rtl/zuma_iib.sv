// zuma_iib: two-stage LUTRAM local interconnect of a ZUMA cluster.
//
// Routes the I cluster inputs plus N eBLE feedback signals (I+N in all) to
// the N*K eLUT input pins.  It is a Clos network whose third stage is
// dropped, because the order of the inputs of one eLUT does not matter:
//   stage 1: P = (I+N)/K crossbars, each K inputs -> K outputs, one K-deep
//            (2^K entries) K-bit-wide LUTRAM each;
//   stage 2: K crossbars, each P inputs -> N outputs, one 2^P x N LUTRAM.
// Output j of stage-1 crossbar p feeds input p of stage-2 crossbar j, and
// output n of stage-2 crossbar j drives input j of eLUT n.  Each crossbar
// output bit is programmed as a pass-through of one of its inputs.
// Configuration: one cfg word per address holds P*K stage-1 bits followed by
// K*N stage-2 bits; stage 2 uses the low P bits of the address.
// Timing: purely combinational from in to lut_in.
// Warnings: in a tile, UNOPTFLAT may name this block's signals, because its
// inputs include the eBLE outputs it helps drive; the loop is the cluster's
// feedback path and is closed only by configuration.
// Structure and sizes follow the overlay architecture; the bit packing of
// the configuration word is this design's own.
module zuma_iib #(
  parameter int unsigned K = 6,
  parameter int unsigned N = 8,
  parameter int unsigned I = 28,
  localparam int unsigned P = (I + N) / K,
  localparam int unsigned CFG_W = P*K + K*N
) (
  input  logic             clk,
  input  logic             cfg_we,
  input  logic [K-1:0]     cfg_addr,
  input  logic [CFG_W-1:0] cfg_data,
  input  logic [I+N-1:0]   in,
  output logic [N*K-1:0]   lut_in      // eLUT n input j at bit n*K+j
);
  initial begin
    assert ((I + N) % K == 0) else $error("zuma_iib: I+N must be a multiple of K");
    assert (P <= K) else $error("zuma_iib: stage-2 crossbars need P <= K");
  end

  logic [K-1:0] s1_out [P];
  logic [P-1:0] s2_in  [K];
  logic [N-1:0] s2_out [K];

  for (genvar p = 0; p < P; p++) begin : g_s1
    zuma_lutram #(.K(K), .W(K)) u_xbar (
      .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
      .cfg_data(cfg_data[p*K +: K]),
      .rd_addr(in[p*K +: K]), .rd_data(s1_out[p])
    );
  end

  for (genvar j = 0; j < K; j++) begin : g_s2
    for (genvar p = 0; p < P; p++) begin : g_in
      assign s2_in[j][p] = s1_out[p][j];
    end
    zuma_lutram #(.K(P), .W(N)) u_xbar (
      .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr[P-1:0]),
      .cfg_data(cfg_data[P*K + j*N +: N]),
      .rd_addr(s2_in[j]), .rd_data(s2_out[j])
    );
    for (genvar n = 0; n < N; n++) begin : g_out
      assign lut_in[n*K + j] = s2_out[j][n];
    end
  end
endmodule
