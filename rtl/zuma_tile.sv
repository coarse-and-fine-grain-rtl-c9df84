// zuma_tile: one layout tile of the ZUMA island-style overlay.
//
// Contains the input block, the logic cluster (two-stage IIB plus N eBLEs)
// and the S-block, and carries the four unidirectional routing buses through
// the tile.  Each direction has WD = W/2 wires (W tracks per channel, half
// in each direction), of length L tiles.  Wires are staggered so that every
// tile is identical: of the WD wires of a direction entering the tile,
// indices WD-S..WD-1 end here (S = WD/L), the others move up by S, and the
// S new wires from the S-block take indices 0..S-1 of the leaving bus.
//   out[s]     = S-block wire s          (s < S)
//   out[S + j] = in[j]                   (j < WD-S)
// The input block sees all 4*WD entering wires.  The IIB sees the I cluster
// inputs (low bits) and the N eBLE outputs (high bits, feedback); the eBLE
// outputs also feed the S-block.
// Configuration word (CFG_W bits, written at LUTRAM address cfg_addr):
//   [I-1:0] input block | [4S] S-block | [P*K + K*N] IIB | [N] eLUTs |
//   [N] eBLE flop-bypass bits (taken at address 0 only).
// Bus packing: direction d (0 E, 1 W, 2 N, 3 S) at bits d*WD +: WD.
// Timing: combinational from wires to wires, except the eBLE flops.
// Warnings: UNOPTFLAT on the cluster signals is expected: eBLE outputs feed
// back into the IIB and the S-block, so the netlist has loops that only a
// configuration can close (a combinational eBLE feeding itself).
// Tile contents and parameters follow the architecture; the stagger and the
// word packing are this design's own.
module zuma_tile #(
  parameter int unsigned K = 6,
  parameter int unsigned N = 8,
  parameter int unsigned I = 28,
  parameter int unsigned W = 112,
  parameter int unsigned L = 4,
  localparam int unsigned WD = W / 2,
  localparam int unsigned S  = WD / L,
  localparam int unsigned P  = (I + N) / K,
  localparam int unsigned IIB_W = P*K + K*N,
  localparam int unsigned CFG_W = I + 4*S + IIB_W + 2*N
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cfg_we,
  input  logic [K-1:0]     cfg_addr,
  input  logic [CFG_W-1:0] cfg_data,
  input  logic             user_en,
  input  logic [4*WD-1:0]  in_w,
  output logic [4*WD-1:0]  out_w,
  output logic [N-1:0]     cl_out
);
  localparam int unsigned O_SB  = I;
  localparam int unsigned O_IIB = O_SB + 4*S;
  localparam int unsigned O_LUT = O_IIB + IIB_W;
  localparam int unsigned O_MOD = O_LUT + N;

  logic [I-1:0]   cl_in;
  logic [N*K-1:0] lut_in;
  logic [4*S-1:0] term, start;

  zuma_input_block #(.K(K), .I(I), .TRK(4*WD)) u_ib (
    .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data[0 +: I]),
    .tracks(in_w), .cl_in(cl_in)
  );

  zuma_iib #(.K(K), .N(N), .I(I)) u_iib (
    .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data[O_IIB +: IIB_W]),
    .in({cl_out, cl_in}), .lut_in(lut_in)
  );

  for (genvar n = 0; n < N; n++) begin : g_ble
    zuma_ble #(.K(K)) u_ble (
      .clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
      .cfg_lut_bit(cfg_data[O_LUT + n]), .cfg_mode_bit(cfg_data[O_MOD + n]),
      .user_en(user_en), .in(lut_in[n*K +: K]), .out(cl_out[n])
    );
  end

  for (genvar d = 0; d < 4; d++) begin : g_dir
    assign term[d*S +: S] = in_w[d*WD + WD - S +: S];
    assign out_w[d*WD +: S] = start[d*S +: S];
    assign out_w[d*WD + S +: WD - S] = in_w[d*WD +: WD - S];
  end

  zuma_switch_block #(.K(K), .N(N), .S(S)) u_sb (
    .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data[O_SB +: 4*S]),
    .user_en(user_en), .term(term), .cl_out(cl_out), .start(start)
  );
endmodule
