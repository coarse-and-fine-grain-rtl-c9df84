// zuma_array: ROWS x COLS grid of ZUMA tiles.
//
// Joins the four unidirectional routing buses of neighbouring tiles (row 0
// is the south edge, column 0 the west edge) and brings the buses that enter
// and leave the grid out as ports: eastbound wires enter at the west edge
// (io_in_e, one bus per row) and leave at the east edge (io_out_e), and
// likewise for the other three directions.  Peripheral I/O pads attach to
// these edge buses.  Every tile shares the configuration address and data;
// cfg_we has one bit per tile (tile r*COLS + c), driven by the shift chain
// of the configuration controller.
// Timing: combinational through the routing; only the eBLE flops are clocked.
// Warnings: Verilator reports UNOPTFLAT on the tile buses.  The routing of
// an FPGA fabric forms loops through the tiles (a wire can be routed back
// to where it came from); a sensible configuration never closes one, and
// the buses are held at 0 while loading, so the loops are kept on purpose.
module zuma_array #(
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3,
  parameter int unsigned K = 6,
  parameter int unsigned N = 8,
  parameter int unsigned I = 28,
  parameter int unsigned W = 112,
  parameter int unsigned L = 4,
  localparam int unsigned WD = W / 2,
  localparam int unsigned S  = WD / L,
  localparam int unsigned P  = (I + N) / K,
  localparam int unsigned CFG_W = I + 4*S + P*K + K*N + 2*N
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [ROWS*COLS-1:0]      cfg_we,
  input  logic [K-1:0]              cfg_addr,
  input  logic [CFG_W-1:0]          cfg_data,
  input  logic                      user_en,
  input  logic [ROWS-1:0][WD-1:0]   io_in_e,   // enters west edge, eastbound
  input  logic [ROWS-1:0][WD-1:0]   io_in_w,   // enters east edge, westbound
  input  logic [COLS-1:0][WD-1:0]   io_in_n,   // enters south edge, northbound
  input  logic [COLS-1:0][WD-1:0]   io_in_s,   // enters north edge, southbound
  output logic [ROWS-1:0][WD-1:0]   io_out_e,  // leaves east edge
  output logic [ROWS-1:0][WD-1:0]   io_out_w,  // leaves west edge
  output logic [COLS-1:0][WD-1:0]   io_out_n,  // leaves north edge
  output logic [COLS-1:0][WD-1:0]   io_out_s,  // leaves south edge
  output logic [ROWS*COLS-1:0][N-1:0] cl_out  // cluster outputs, for observation
);
  // tile buses: [dir][row][col]
  logic [WD-1:0] t_in  [4][ROWS][COLS];
  logic [WD-1:0] t_out [4][ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [4*WD-1:0] in_w, out_w;
      for (genvar d = 0; d < 4; d++) begin : g_pack
        assign in_w[d*WD +: WD] = t_in[d][r][c];
        assign t_out[d][r][c]   = out_w[d*WD +: WD];
      end
      // eastbound (0)
      if (c == 0) begin : g_e0  assign t_in[0][r][c] = io_in_e[r]; end
      else begin : g_e1         assign t_in[0][r][c] = t_out[0][r][c-1]; end
      // westbound (1)
      if (c == COLS-1) begin : g_w0 assign t_in[1][r][c] = io_in_w[r]; end
      else begin : g_w1             assign t_in[1][r][c] = t_out[1][r][c+1]; end
      // northbound (2)
      if (r == 0) begin : g_n0  assign t_in[2][r][c] = io_in_n[c]; end
      else begin : g_n1         assign t_in[2][r][c] = t_out[2][r-1][c]; end
      // southbound (3)
      if (r == ROWS-1) begin : g_s0 assign t_in[3][r][c] = io_in_s[c]; end
      else begin : g_s1             assign t_in[3][r][c] = t_out[3][r+1][c]; end

      zuma_tile #(.K(K), .N(N), .I(I), .W(W), .L(L)) u_tile (
        .clk(clk), .rst(rst), .cfg_we(cfg_we[r*COLS + c]), .cfg_addr(cfg_addr),
        .cfg_data(cfg_data), .user_en(user_en), .in_w(in_w), .out_w(out_w),
        .cl_out(cl_out[r*COLS + c])
      );
    end
    assign io_out_e[r] = t_out[0][r][COLS-1];
    assign io_out_w[r] = t_out[1][r][0];
  end
  for (genvar c = 0; c < COLS; c++) begin : g_colio
    assign io_out_n[c] = t_out[2][ROWS-1][c];
    assign io_out_s[c] = t_out[3][0][c];
  end
endmodule
