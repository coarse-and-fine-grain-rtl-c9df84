// carbon_array: ROWS x COLS CARBON-Razor array of coarse-grain elements.
//
// Row 0 is the north edge, column 0 the west edge.  Between neighbours run
// (a) a write port: CG(r,c)'s north output writes the south memory of
// CG(r-1,c), and likewise for the other sides, and (b) one stall wire in
// each direction, which together form the 2D Razor stall network: an error
// at one CG stalls it, its four neighbours one clock later, the CGs two hops
// away one clock after that, and so on (a diamond wavefront); wavefronts that
// meet merge and each CG stalls once per wavefront.
//
// The array edge: writes that leave the array are brought out as ports
// (ext_out_*), and external writes into the edge memories come in as ports
// (ext_in_*), one per row (west, east) or column (north, south).  Stall
// inputs at the edge are 0.  The configuration controller (carbon_cfg) loads
// the instruction memories; the scheduler (carbon_sched) issues go for each
// user cycle in hard-deadline or compute-accelerator mode.
// err_inject (per CG, per memory N, S, E, W, R) is the timing-error model of
// carbon_mem; tie it to 0 in use.
// The default 2x2 size is the array used for the published benchmark runs;
// the largest FPGA of that family holds 10x10.
// Warnings: pc_e of each CG is left open (PINCONNECTEMPTY), and the spare
// instruction bits and the stall outputs at the array edge are unused: edge
// CGs have no neighbour to stall.
module carbon_array
  import carbon_pkg::*;
#(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 2,
  parameter int unsigned CNT_W = 10,
  localparam int unsigned NCG  = ROWS * COLS,
  localparam int unsigned CG_W = (NCG > 1) ? $clog2(NCG) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  // configuration
  input  logic                  cfg_valid,
  input  logic                  cfg_bcast,
  input  logic [CG_W-1:0]       cfg_cg,
  input  logic [PC_W-1:0]       cfg_addr,
  input  instr_t                cfg_data,
  // scheduling
  input  logic                  run,
  input  logic                  accel_mode,
  input  logic [CNT_W-1:0]      cycle_len,
  output logic                  go,
  output logic [31:0]           user_cycles,
  output logic [31:0]           overruns,
  // edge writes into the array: west/east per row, north/south per column
  input  logic [ROWS-1:0]       ext_in_we_w,  ext_in_we_e,
  input  addr_t [ROWS-1:0]      ext_in_addr_w, ext_in_addr_e,
  input  word_t [ROWS-1:0]      ext_in_data_w, ext_in_data_e,
  input  logic [COLS-1:0]       ext_in_we_n,  ext_in_we_s,
  input  addr_t [COLS-1:0]      ext_in_addr_n, ext_in_addr_s,
  input  word_t [COLS-1:0]      ext_in_data_n, ext_in_data_s,
  // edge writes leaving the array
  output logic [ROWS-1:0]       ext_out_we_w, ext_out_we_e,
  output addr_t [ROWS-1:0]      ext_out_addr_w, ext_out_addr_e,
  output word_t [ROWS-1:0]      ext_out_data_w, ext_out_data_e,
  output logic [COLS-1:0]       ext_out_we_n, ext_out_we_s,
  output addr_t [COLS-1:0]      ext_out_addr_n, ext_out_addr_s,
  output word_t [COLS-1:0]      ext_out_data_n, ext_out_data_s,
  // timing-error model and observation
  input  word_t [NCG-1:0][4:0]  err_inject,
  output logic [NCG-1:0]        stalling,
  output logic [NCG-1:0]        executing
);
  logic [NCG-1:0]       imem_we;
  logic [PC_W-1:0]      imem_addr;
  instr_t               imem_wdata;
  logic [NCG-1:0]       done;

  logic [3:0]  c_in_we    [ROWS][COLS];
  addr_t [3:0] c_in_addr  [ROWS][COLS];
  word_t [3:0] c_in_data  [ROWS][COLS];
  logic [3:0]  c_out_we   [ROWS][COLS];
  addr_t [3:0] c_out_addr [ROWS][COLS];
  word_t [3:0] c_out_data [ROWS][COLS];
  logic [3:0]  c_stall_in [ROWS][COLS];
  logic [3:0]  c_stall_out[ROWS][COLS];

  carbon_cfg #(.NCG(NCG)) u_cfg (
    .clk(clk), .rst(rst), .cfg_valid(cfg_valid), .cfg_bcast(cfg_bcast), .cfg_cg(cfg_cg),
    .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .imem_we(imem_we), .imem_addr(imem_addr), .imem_wdata(imem_wdata)
  );

  carbon_sched #(.CNT_W(CNT_W)) u_sched (
    .clk(clk), .rst(rst), .run(run), .accel_mode(accel_mode), .cycle_len(cycle_len),
    .all_done(&done), .go(go), .user_cycles(user_cycles), .overruns(overruns)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned IDX = r*COLS + c;
      // north side: neighbour (r-1, c), its south output
      if (r == 0) begin : g_n_edge
        assign c_in_we[r][c][M_N]   = ext_in_we_n[c];
        assign c_in_addr[r][c][M_N] = ext_in_addr_n[c];
        assign c_in_data[r][c][M_N] = ext_in_data_n[c];
        assign c_stall_in[r][c][M_N] = 1'b0;
        assign ext_out_we_n[c]   = c_out_we[r][c][M_N];
        assign ext_out_addr_n[c] = c_out_addr[r][c][M_N];
        assign ext_out_data_n[c] = c_out_data[r][c][M_N];
      end else begin : g_n_nb
        assign c_in_we[r][c][M_N]   = c_out_we[r-1][c][M_S];
        assign c_in_addr[r][c][M_N] = c_out_addr[r-1][c][M_S];
        assign c_in_data[r][c][M_N] = c_out_data[r-1][c][M_S];
        assign c_stall_in[r][c][M_N] = c_stall_out[r-1][c][M_S];
      end
      // south side
      if (r == ROWS-1) begin : g_s_edge
        assign c_in_we[r][c][M_S]   = ext_in_we_s[c];
        assign c_in_addr[r][c][M_S] = ext_in_addr_s[c];
        assign c_in_data[r][c][M_S] = ext_in_data_s[c];
        assign c_stall_in[r][c][M_S] = 1'b0;
        assign ext_out_we_s[c]   = c_out_we[r][c][M_S];
        assign ext_out_addr_s[c] = c_out_addr[r][c][M_S];
        assign ext_out_data_s[c] = c_out_data[r][c][M_S];
      end else begin : g_s_nb
        assign c_in_we[r][c][M_S]   = c_out_we[r+1][c][M_N];
        assign c_in_addr[r][c][M_S] = c_out_addr[r+1][c][M_N];
        assign c_in_data[r][c][M_S] = c_out_data[r+1][c][M_N];
        assign c_stall_in[r][c][M_S] = c_stall_out[r+1][c][M_N];
      end
      // east side
      if (c == COLS-1) begin : g_e_edge
        assign c_in_we[r][c][M_E]   = ext_in_we_e[r];
        assign c_in_addr[r][c][M_E] = ext_in_addr_e[r];
        assign c_in_data[r][c][M_E] = ext_in_data_e[r];
        assign c_stall_in[r][c][M_E] = 1'b0;
        assign ext_out_we_e[r]   = c_out_we[r][c][M_E];
        assign ext_out_addr_e[r] = c_out_addr[r][c][M_E];
        assign ext_out_data_e[r] = c_out_data[r][c][M_E];
      end else begin : g_e_nb
        assign c_in_we[r][c][M_E]   = c_out_we[r][c+1][M_W];
        assign c_in_addr[r][c][M_E] = c_out_addr[r][c+1][M_W];
        assign c_in_data[r][c][M_E] = c_out_data[r][c+1][M_W];
        assign c_stall_in[r][c][M_E] = c_stall_out[r][c+1][M_W];
      end
      // west side
      if (c == 0) begin : g_w_edge
        assign c_in_we[r][c][M_W]   = ext_in_we_w[r];
        assign c_in_addr[r][c][M_W] = ext_in_addr_w[r];
        assign c_in_data[r][c][M_W] = ext_in_data_w[r];
        assign c_stall_in[r][c][M_W] = 1'b0;
        assign ext_out_we_w[r]   = c_out_we[r][c][M_W];
        assign ext_out_addr_w[r] = c_out_addr[r][c][M_W];
        assign ext_out_data_w[r] = c_out_data[r][c][M_W];
      end else begin : g_w_nb
        assign c_in_we[r][c][M_W]   = c_out_we[r][c-1][M_E];
        assign c_in_addr[r][c][M_W] = c_out_addr[r][c-1][M_E];
        assign c_in_data[r][c][M_W] = c_out_data[r][c-1][M_E];
        assign c_stall_in[r][c][M_W] = c_stall_out[r][c-1][M_E];
      end

      carbon_cg u_cg (
        .clk(clk), .rst(rst),
        .imem_we(imem_we[IDX]), .imem_addr(imem_addr), .imem_wdata(imem_wdata),
        .go(go), .done(done[IDX]),
        .in_we(c_in_we[r][c]), .in_addr(c_in_addr[r][c]), .in_data(c_in_data[r][c]),
        .err_inject(err_inject[IDX]),
        .out_we(c_out_we[r][c]), .out_addr(c_out_addr[r][c]), .out_data(c_out_data[r][c]),
        .stall_in(c_stall_in[r][c]), .stall_out(c_stall_out[r][c]),
        .count_stall(stalling[IDX]), .exec(executing[IDX]), .pc_e()
      );
    end
  end
endmodule
