// zuma_fabric: a complete ZUMA overlay, the tile array plus its
// configuration controller.
//
// After begin_cfg the controller streams ROWS*COLS*2^K bitstream words
// (one per clock, taken when bs_rd is high) into the tiles; the fabric's
// routing muxes and eBLE outputs are held at 0 until cfg_done, then the
// configured user circuit runs on clk.  User signals enter and leave through
// the edge routing buses (see zuma_array).  Default sizes are those of the
// published architecture (k = 6, N = 8, I = 28, W = 112, L = 4) on the 3x3
// array that was tested on a board.
module zuma_fabric #(
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
  input  logic                      begin_cfg,
  input  logic [CFG_W-1:0]          bs_data,
  output logic                      bs_rd,
  output logic                      cfg_done,
  input  logic [ROWS-1:0][WD-1:0]   io_in_e,
  input  logic [ROWS-1:0][WD-1:0]   io_in_w,
  input  logic [COLS-1:0][WD-1:0]   io_in_n,
  input  logic [COLS-1:0][WD-1:0]   io_in_s,
  output logic [ROWS-1:0][WD-1:0]   io_out_e,
  output logic [ROWS-1:0][WD-1:0]   io_out_w,
  output logic [COLS-1:0][WD-1:0]   io_out_n,
  output logic [COLS-1:0][WD-1:0]   io_out_s,
  output logic [ROWS*COLS-1:0][N-1:0] cl_out
);
  logic [ROWS*COLS-1:0] cfg_we;
  logic [K-1:0]         cfg_addr;
  logic [CFG_W-1:0]     cfg_data;

  zuma_config_ctrl #(.K(K), .G(ROWS*COLS), .DW(CFG_W)) u_cfg (
    .clk(clk), .rst(rst), .begin_cfg(begin_cfg), .bs_data(bs_data), .bs_rd(bs_rd),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data), .done(cfg_done)
  );

  zuma_array #(.ROWS(ROWS), .COLS(COLS), .K(K), .N(N), .I(I), .W(W), .L(L)) u_array (
    .clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .user_en(cfg_done),
    .io_in_e(io_in_e), .io_in_w(io_in_w), .io_in_n(io_in_n), .io_in_s(io_in_s),
    .io_out_e(io_out_e), .io_out_w(io_out_w), .io_out_n(io_out_n), .io_out_s(io_out_s),
    .cl_out(cl_out)
  );
endmodule
