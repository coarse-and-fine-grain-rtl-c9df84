// overlay_top: the two FPGA overlays side by side.
//
// zuma_*   : a fine-grain ZUMA fabric, an island-style FPGA built from
//            LUTRAMs (k = 6, N = 8, I = 28, W = 112, L = 4, 3x3 tiles),
//            configured through its shift-chain configuration controller and
//            reached through its edge routing buses.
// carbon_* : a coarse-grain CARBON-Razor array (2x2 CGs by default) with
//            instruction-memory configuration port, user-cycle scheduler,
//            edge write ports and the Razor timing-error model input.
// The two share only clk and rst; they are independent overlays that
// implement the fine and the coarse half of a hybrid time-multiplexed
// architecture.  See zuma_fabric and carbon_array for timing.
// Warnings: the UNOPTFLAT (ZUMA routing loops) and unused-signal warnings
// (edge stalls, spare instruction bits) are explained in zuma_array,
// zuma_tile and carbon_array.
module overlay_top
  import carbon_pkg::*;
#(
  parameter int unsigned Z_ROWS = 3,
  parameter int unsigned Z_COLS = 3,
  parameter int unsigned Z_K = 6,
  parameter int unsigned Z_N = 8,
  parameter int unsigned Z_I = 28,
  parameter int unsigned Z_W = 112,
  parameter int unsigned Z_L = 4,
  parameter int unsigned C_ROWS = 2,
  parameter int unsigned C_COLS = 2,
  parameter int unsigned C_CNT_W = 10,
  localparam int unsigned Z_WD = Z_W / 2,
  localparam int unsigned Z_S  = Z_WD / Z_L,
  localparam int unsigned Z_P  = (Z_I + Z_N) / Z_K,
  localparam int unsigned Z_CFG_W = Z_I + 4*Z_S + Z_P*Z_K + Z_K*Z_N + 2*Z_N,
  localparam int unsigned C_NCG = C_ROWS * C_COLS,
  localparam int unsigned C_CG_W = (C_NCG > 1) ? $clog2(C_NCG) : 1
) (
  input  logic                          clk,
  input  logic                          rst,
  // ---------------- ZUMA ----------------
  input  logic                          zuma_begin_cfg,
  input  logic [Z_CFG_W-1:0]            zuma_bs_data,
  output logic                          zuma_bs_rd,
  output logic                          zuma_cfg_done,
  input  logic [Z_ROWS-1:0][Z_WD-1:0]   zuma_in_e,
  input  logic [Z_ROWS-1:0][Z_WD-1:0]   zuma_in_w,
  input  logic [Z_COLS-1:0][Z_WD-1:0]   zuma_in_n,
  input  logic [Z_COLS-1:0][Z_WD-1:0]   zuma_in_s,
  output logic [Z_ROWS-1:0][Z_WD-1:0]   zuma_out_e,
  output logic [Z_ROWS-1:0][Z_WD-1:0]   zuma_out_w,
  output logic [Z_COLS-1:0][Z_WD-1:0]   zuma_out_n,
  output logic [Z_COLS-1:0][Z_WD-1:0]   zuma_out_s,
  output logic [Z_ROWS*Z_COLS-1:0][Z_N-1:0] zuma_cl_out,
  // ---------------- CARBON-Razor ----------------
  input  logic                          carbon_cfg_valid,
  input  logic                          carbon_cfg_bcast,
  input  logic [C_CG_W-1:0]             carbon_cfg_cg,
  input  logic [PC_W-1:0]               carbon_cfg_addr,
  input  instr_t                        carbon_cfg_data,
  input  logic                          carbon_run,
  input  logic                          carbon_accel_mode,
  input  logic [C_CNT_W-1:0]            carbon_cycle_len,
  output logic                          carbon_go,
  output logic [31:0]                   carbon_user_cycles,
  output logic [31:0]                   carbon_overruns,
  input  logic [C_ROWS-1:0]             carbon_in_we_w, carbon_in_we_e,
  input  addr_t [C_ROWS-1:0]            carbon_in_addr_w, carbon_in_addr_e,
  input  word_t [C_ROWS-1:0]            carbon_in_data_w, carbon_in_data_e,
  input  logic [C_COLS-1:0]             carbon_in_we_n, carbon_in_we_s,
  input  addr_t [C_COLS-1:0]            carbon_in_addr_n, carbon_in_addr_s,
  input  word_t [C_COLS-1:0]            carbon_in_data_n, carbon_in_data_s,
  output logic [C_ROWS-1:0]             carbon_out_we_w, carbon_out_we_e,
  output addr_t [C_ROWS-1:0]            carbon_out_addr_w, carbon_out_addr_e,
  output word_t [C_ROWS-1:0]            carbon_out_data_w, carbon_out_data_e,
  output logic [C_COLS-1:0]             carbon_out_we_n, carbon_out_we_s,
  output addr_t [C_COLS-1:0]            carbon_out_addr_n, carbon_out_addr_s,
  output word_t [C_COLS-1:0]            carbon_out_data_n, carbon_out_data_s,
  input  word_t [C_NCG-1:0][4:0]        carbon_err_inject,
  output logic [C_NCG-1:0]              carbon_stalling,
  output logic [C_NCG-1:0]              carbon_executing
);
  zuma_fabric #(.ROWS(Z_ROWS), .COLS(Z_COLS), .K(Z_K), .N(Z_N), .I(Z_I), .W(Z_W), .L(Z_L)) u_zuma (
    .clk(clk), .rst(rst), .begin_cfg(zuma_begin_cfg), .bs_data(zuma_bs_data),
    .bs_rd(zuma_bs_rd), .cfg_done(zuma_cfg_done),
    .io_in_e(zuma_in_e), .io_in_w(zuma_in_w), .io_in_n(zuma_in_n), .io_in_s(zuma_in_s),
    .io_out_e(zuma_out_e), .io_out_w(zuma_out_w), .io_out_n(zuma_out_n), .io_out_s(zuma_out_s),
    .cl_out(zuma_cl_out)
  );

  carbon_array #(.ROWS(C_ROWS), .COLS(C_COLS), .CNT_W(C_CNT_W)) u_carbon (
    .clk(clk), .rst(rst),
    .cfg_valid(carbon_cfg_valid), .cfg_bcast(carbon_cfg_bcast), .cfg_cg(carbon_cfg_cg),
    .cfg_addr(carbon_cfg_addr), .cfg_data(carbon_cfg_data),
    .run(carbon_run), .accel_mode(carbon_accel_mode), .cycle_len(carbon_cycle_len),
    .go(carbon_go), .user_cycles(carbon_user_cycles), .overruns(carbon_overruns),
    .ext_in_we_w(carbon_in_we_w), .ext_in_we_e(carbon_in_we_e),
    .ext_in_addr_w(carbon_in_addr_w), .ext_in_addr_e(carbon_in_addr_e),
    .ext_in_data_w(carbon_in_data_w), .ext_in_data_e(carbon_in_data_e),
    .ext_in_we_n(carbon_in_we_n), .ext_in_we_s(carbon_in_we_s),
    .ext_in_addr_n(carbon_in_addr_n), .ext_in_addr_s(carbon_in_addr_s),
    .ext_in_data_n(carbon_in_data_n), .ext_in_data_s(carbon_in_data_s),
    .ext_out_we_w(carbon_out_we_w), .ext_out_we_e(carbon_out_we_e),
    .ext_out_addr_w(carbon_out_addr_w), .ext_out_addr_e(carbon_out_addr_e),
    .ext_out_data_w(carbon_out_data_w), .ext_out_data_e(carbon_out_data_e),
    .ext_out_we_n(carbon_out_we_n), .ext_out_we_s(carbon_out_we_s),
    .ext_out_addr_n(carbon_out_addr_n), .ext_out_addr_s(carbon_out_addr_s),
    .ext_out_data_n(carbon_out_data_n), .ext_out_data_s(carbon_out_data_s),
    .err_inject(carbon_err_inject), .stalling(carbon_stalling), .executing(carbon_executing)
  );
endmodule
